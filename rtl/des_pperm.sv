// des_pperm: DES P permutation.
//
// Combinational wiring that permutes the 32 bits coming out of the eight
// S-boxes: output bit n is input bit P_TAB[n-1], bit 1 = MSB.
// The table follows the document (standard DES P).
module des_pperm
  import des_pkg::*;
(
  input  half_t s,     // S-box layer output
  output half_t p      // P(s)
);
  for (genvar n = 0; n < 32; n++) begin : g_bit
    assign p[31-n] = s[32-P_TAB[n]];
  end
endmodule
