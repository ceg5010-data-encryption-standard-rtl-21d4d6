// des_keysched: DES key schedule, all sixteen round keys at once.
//
// Combinational. PC-1 drops the eight parity bits (8, 16, ..., 64) and
// reorders the rest into two 28-bit halves C0 and D0. For round i = 1..16,
// C[i] and D[i] are C[i-1] and D[i-1] rotated left by ROT_TAB[i-1] (1 or 2
// places, 28 in total), and PC-2 selects 48 of the 56 bits of C[i]D[i] as the
// round key K[i]. For decryption the same keys are delivered in reverse
// order: round i gets K[17-i]. rk[0] goes to round 1.
// PC-1, PC-2, the rotation counts and the reversed order for decryption
// follow the document; delivering all keys at once from one combinational
// block mirrors its structure, and the decrypt port is this design's own.
module des_keysched
  import des_pkg::*;
(
  input  block_t      key,       // 64-bit key, bit 1 = MSB
  input  logic        decrypt,   // 1: reverse key order
  output rkey_t [15:0] rk        // rk[i-1] is the key of round i
);
  logic [55:0] cd0;
  kreg_t c [0:16];
  kreg_t d [0:16];
  rkey_t ks [1:16];

  for (genvar n = 0; n < 56; n++) begin : g_pc1
    assign cd0[55-n] = key[64-PC1_TAB[n]];
  end

  assign c[0] = cd0[55:28];
  assign d[0] = cd0[27:0];

  for (genvar i = 1; i <= 16; i++) begin : g_round
    logic [55:0] cd;
    if (ROT_TAB[i-1] == 1) begin : g_rol1
      assign c[i] = {c[i-1][26:0], c[i-1][27]};
      assign d[i] = {d[i-1][26:0], d[i-1][27]};
    end else begin : g_rol2
      assign c[i] = {c[i-1][25:0], c[i-1][27:26]};
      assign d[i] = {d[i-1][25:0], d[i-1][27:26]};
    end
    assign cd = {c[i], d[i]};
    for (genvar n = 0; n < 48; n++) begin : g_pc2
      assign ks[i][47-n] = cd[56-PC2_TAB[n]];
    end
    assign rk[i-1] = decrypt ? ks[17-i] : ks[i];
  end
endmodule
