// des_expand: DES expansion permutation E.
//
// Combinational wiring from the 32-bit right half to 48 bits. The 32 bits
// are read as eight 4-bit groups; each group is copied with the neighbouring
// bit of the group on either side (wrapping from bit 32 to bit 1), so every
// 6-bit slice of the result feeds one S-box. Output bit n is input bit
// E_TAB[n-1], bit 1 = MSB.
// The table follows the document (standard DES E).
module des_expand
  import des_pkg::*;
(
  input  half_t r,     // R[i-1]
  output rkey_t e      // E(R[i-1])
);
  for (genvar n = 0; n < 48; n++) begin : g_bit
    assign e[47-n] = r[32-E_TAB[n]];
  end
endmodule
