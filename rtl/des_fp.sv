// des_fp: DES final permutation IP^-1.
//
// Combinational wiring. The two inputs are concatenated as {l, r} and output
// bit n is input bit FP_TAB[n-1] (bit 1 = MSB). The round pipeline connects
// l = R16 and r = L16, which undoes the swap of the last round, so the
// preoutput block is R16 L16 as in the DES block diagram. No clock.
// The table and the R16/L16 input order follow the document.
module des_fp
  import des_pkg::*;
(
  input  half_t  l,    // first half of the preoutput (R16)
  input  half_t  r,    // second half of the preoutput (L16)
  output block_t ct    // output block
);
  block_t pre;
  assign pre = {l, r};

  for (genvar n = 0; n < 64; n++) begin : g_bit
    assign ct[63-n] = pre[64-FP_TAB[n]];
  end
endmodule
