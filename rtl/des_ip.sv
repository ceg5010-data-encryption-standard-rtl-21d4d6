// des_ip: DES initial permutation.
//
// Purely combinational wiring: output bit n of IP is plaintext bit IP_TAB[n-1]
// (bit 1 = MSB), and the 64-bit result is split into the left half L0 (IP bits
// 1..32) and the right half R0 (IP bits 33..64), as in the DES block diagram.
// The table is the standard IP table. No clock, no latency.
// The table, the bit numbering and the split into two halves follow the
// document; they are the standard DES definitions.
module des_ip
  import des_pkg::*;
(
  input  block_t pt,   // plaintext (or ciphertext when decrypting)
  output half_t  l0,   // L0
  output half_t  r0    // R0
);
  block_t perm;

  for (genvar n = 0; n < 64; n++) begin : g_bit
    assign perm[63-n] = pt[64-IP_TAB[n]];
  end

  assign l0 = perm[63:32];
  assign r0 = perm[31:0];
endmodule
