// des_modes: ECB / CBC front end for the pipelined DES core.
//
// ECB: every block is processed on its own, so blocks stream into des_pipe
// at one per cycle and leave 16 cycles later in the same order.
// CBC encryption: ct[i] = DES(pt[i] xor ct[i-1]) with ct[0] = IV. Each block
// needs the previous ciphertext, so only one block can be in the pipeline:
// the front end holds in_ready low while a block is in flight. The ciphertext
// leaving the pipeline is forwarded straight to the input xor in the cycle it
// is taken, so a new CBC block can enter on that same edge and the CBC rate
// is one block every 16 cycles.
// CBC decryption (the inverse, pt[i] = DES^-1(ct[i]) xor ct[i-1]) is run the
// same way, one block at a time, to keep one control path for both modes.
//
// Interfaces (all valid/ready; a transfer happens on a rising edge where both
// are high):
//   cfg_*  loads key, direction, mode and IV. Accepted only when no block is
//          in flight (cfg_ready), and it takes priority over in_valid.
//   in_*   input blocks.
//   out_*  result blocks. out_ready low while a result waits stalls the
//          whole pipeline through its clock enable.
// The mode handling, the handshakes and the IV register are this design's
// choices; the document gives only the two mode equations and notes that
// the pipeline cannot be filled in CBC mode.
module des_modes
  import des_pkg::*;
(
  input  logic   clk,
  input  logic   rst_n,        // asynchronous, active-low

  input  logic   cfg_valid,
  output logic   cfg_ready,
  input  block_t cfg_key,
  input  logic   cfg_decrypt,  // 0: encrypt, 1: decrypt
  input  mode_e  cfg_mode,
  input  block_t cfg_iv,       // initial chaining value for CBC

  input  logic   in_valid,
  output logic   in_ready,
  input  block_t in_data,

  output logic   out_valid,
  input  logic   out_ready,
  output block_t out_data
);
  block_t key_q, chain_q, cur_q, pipe_in, pipe_ct, chain_now;
  logic   dec_q;
  mode_e  mode_q;
  logic   ce, pipe_vld, in_fire, out_fire, cfg_fire;
  logic [4:0] inflight;

  assign ce        = out_ready || !pipe_vld;
  assign out_valid = pipe_vld;
  assign out_fire  = pipe_vld && out_ready;
  assign cfg_ready = (inflight == 5'd0);
  assign cfg_fire  = cfg_valid && cfg_ready;

  // CBC admits a new block when nothing is in flight or the one in flight
  // leaves in this cycle.
  always_comb begin
    in_ready = ce && !cfg_valid;
    if (mode_q == MODE_CBC)
      in_ready = in_ready && (inflight == 5'd0 || (inflight == 5'd1 && out_fire));
  end
  assign in_fire = in_valid && in_ready;

  // chaining value seen by the block entering now (bypass of the result
  // being taken in the same cycle)
  assign chain_now = (out_fire && !dec_q) ? pipe_ct : chain_q;

  always_comb begin
    pipe_in = in_data;
    if (mode_q == MODE_CBC && !dec_q) pipe_in = in_data ^ chain_now;
  end

  des_pipe u_pipe (
    .clk       (clk),
    .rst_n     (rst_n),
    .ce        (ce),
    .in_valid  (in_fire),
    .pt        (pipe_in),
    .key       (key_q),
    .decrypt   (dec_q),
    .out_valid (pipe_vld),
    .ct        (pipe_ct)
  );

  assign out_data = (mode_q == MODE_CBC && dec_q) ? (pipe_ct ^ chain_q) : pipe_ct;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      key_q    <= '0;
      dec_q    <= 1'b0;
      mode_q   <= MODE_ECB;
      chain_q  <= '0;
      cur_q    <= '0;
      inflight <= '0;
    end else begin
      if (cfg_fire) begin
        key_q   <= cfg_key;
        dec_q   <= cfg_decrypt;
        mode_q  <= cfg_mode;
        chain_q <= cfg_iv;
      end else begin
        if (out_fire) chain_q <= dec_q ? cur_q : pipe_ct;
        if (in_fire)  cur_q   <= in_data;
      end
      inflight <= inflight + 5'(in_fire) - 5'(out_fire);

      // rules of the handshakes
      assert (!(cfg_fire && in_fire))
        else $error("des_modes: block accepted together with a new configuration");
      assert (mode_q != MODE_CBC || inflight <= 5'd1)
        else $error("des_modes: more than one CBC block in flight");
      assert (inflight <= 5'(ROUNDS))
        else $error("des_modes: more blocks in flight than pipeline stages");
    end
  end

endmodule
