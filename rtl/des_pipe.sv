// des_pipe: fully unrolled, fully pipelined DES encryption/decryption.
//
// The key schedule, the initial permutation, sixteen registered rounds and
// the final permutation are chained as in the DES block diagram, with a
// register after every round. With ce held high a new 64-bit block can enter
// on every cycle and its result leaves 16 cycles later (in_valid at edge t,
// out_valid and ct at edge t+16). ce low freezes every stage.
//
// The key schedule is combinational and shared by all stages, so key and
// decrypt must stay constant while blocks are in flight; a front end such
// as des_modes registers them. A 16-bit valid shift register, reset by
// rst_n, travels beside the data; it is this design's addition, so that the
// output can be qualified. Decryption uses the same datapath with the round
// keys in reverse order.
// The structure, rate and latency follow the document.
module des_pipe
  import des_pkg::*;
(
  input  logic   clk,
  input  logic   rst_n,      // asynchronous, active-low reset of the valid flags
  input  logic   ce,         // clock enable for the whole pipeline
  input  logic   in_valid,   // pt holds a block to process
  input  block_t pt,         // input block
  input  block_t key,        // 64-bit key, parity bits ignored
  input  logic   decrypt,    // 0: encrypt, 1: decrypt
  output logic   out_valid,  // ct holds a result
  output block_t ct          // result block
);
  rkey_t [15:0] rk;
  half_t l [0:16];
  half_t r [0:16];
  logic [15:0] vld;

  des_keysched u_keysched (.key(key), .decrypt(decrypt), .rk(rk));

  des_ip u_ip (.pt(pt), .l0(l[0]), .r0(r[0]));

  for (genvar i = 1; i <= ROUNDS; i++) begin : g_round
    des_round u_round (
      .clk (clk),
      .ce  (ce),
      .li  (l[i-1]),
      .ri  (r[i-1]),
      .k   (rk[i-1]),
      .lo  (l[i]),
      .ro  (r[i])
    );
  end

  // preoutput is R16 L16
  des_fp u_fp (.l(r[16]), .r(l[16]), .ct(ct));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)  vld <= '0;
    else if (ce) vld <= {vld[14:0], in_valid};
  end

  assign out_valid = vld[15];
endmodule
