// rc5_core: iterative RC5-W/R block cipher core, encryption and decryption.
//
// A block is two W-bit words (A, B). Encryption: A += S[0], B += S[1], then
// for i = 1..R: A = ((A xor B) <<< B) + S[2i]; B = ((B xor A) <<< A) + S[2i+1],
// where <<< rotates left by the low log2(W) bits of the other word and + is
// modulo 2^W. Decryption runs the inverse steps in reverse order:
// for i = R..1: B = ((B - S[2i+1]) >>> A) xor A; A = ((A - S[2i]) >>> B) xor B,
// then B -= S[1], A -= S[0].
//
// One round (both half-rounds) is done per clock; the S[0]/S[1] addition of
// encryption is merged into the load and the subtraction of decryption into
// the last round. The clock edge that accepts start loads the block, the
// next R edges run the rounds, and done is high for one cycle after the last
// of them, R+1 cycles after start, with the result on a_out/b_out, which
// hold until the next start. start is ignored while busy.
// The expanded key words S[0..2R+1] are inputs and must stay stable during a
// block: the key expansion that produces them from the b-byte user key is
// not part of this core. W = 32 and R = 12 are the first of the sizes the
// document lists (w in {32, 64}, r in {12, 16}); the iterative structure and
// the handshake are this design's choices.
module rc5_core #(
  parameter int unsigned W = 32,            // word size in bits
  parameter int unsigned R = 12             // number of rounds
) (
  input  logic                 clk,
  input  logic                 rst_n,       // asynchronous, active-low
  input  logic                 start,       // load a_in/b_in and begin
  input  logic                 decrypt,     // 0: encrypt, 1: decrypt
  input  logic [W-1:0]         a_in,
  input  logic [W-1:0]         b_in,
  input  logic [2*R+1:0][W-1:0] s,          // expanded key words S[0..2R+1]
  output logic                 busy,
  output logic                 done,        // one-cycle pulse, result valid
  output logic [W-1:0]         a_out,
  output logic [W-1:0]         b_out
);
  localparam int unsigned LW = $clog2(W);
  localparam int unsigned CW = $clog2(R + 2);

  typedef enum logic {S_IDLE, S_ROUND} state_e;

  state_e         state;
  logic           dec_q;
  logic [CW-1:0]  rnd;       // current round number, 1..R
  logic [W-1:0]   a_q, b_q;
  logic [W-1:0]   a_enc, b_enc, a_dec, b_dec;

  function automatic logic [W-1:0] rotl(logic [W-1:0] x, logic [LW-1:0] n);
    return (x << n) | (x >> ((W - 32'(n)) % W));
  endfunction

  function automatic logic [W-1:0] rotr(logic [W-1:0] x, logic [LW-1:0] n);
    return (x >> n) | (x << ((W - 32'(n)) % W));
  endfunction

  // one full encryption round i = rnd
  always_comb begin
    a_enc = rotl(a_q ^ b_q, b_q[LW-1:0]) + s[2*rnd];
    b_enc = rotl(b_q ^ a_enc, a_enc[LW-1:0]) + s[2*rnd+1];
  end

  // one full decryption round i = rnd (counting down)
  always_comb begin
    b_dec = rotr(b_q - s[2*rnd+1], a_q[LW-1:0]) ^ a_q;
    a_dec = rotr(a_q - s[2*rnd], b_dec[LW-1:0]) ^ b_dec;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state <= S_IDLE;
      dec_q <= 1'b0;
      rnd   <= '0;
      a_q   <= '0;
      b_q   <= '0;
      done  <= 1'b0;
    end else begin
      done <= 1'b0;
      unique case (state)
        S_IDLE: if (start) begin
          dec_q <= decrypt;
          state <= S_ROUND;
          if (decrypt) begin
            a_q <= a_in;
            b_q <= b_in;
            rnd <= CW'(R);
          end else begin            // encryption: add S[0], S[1] on entry
            a_q <= a_in + s[0];
            b_q <= b_in + s[1];
            rnd <= CW'(1);
          end
        end
        S_ROUND: begin
          if (!dec_q) begin
            a_q <= a_enc;
            b_q <= b_enc;
            if (rnd == CW'(R)) begin
              state <= S_IDLE;
              done  <= 1'b1;
            end
            rnd <= rnd + CW'(1);
          end else if (rnd == CW'(1)) begin
            a_q   <= a_dec - s[0];  // decryption: subtract S[0], S[1] on exit
            b_q   <= b_dec - s[1];
            state <= S_IDLE;
            done  <= 1'b1;
          end else begin
            a_q <= a_dec;
            b_q <= b_dec;
            rnd <= rnd - CW'(1);
          end
        end
        default: state <= S_IDLE;
      endcase
    end
  end

  assign busy  = (state != S_IDLE);
  assign a_out = a_q;
  assign b_out = b_q;
endmodule
