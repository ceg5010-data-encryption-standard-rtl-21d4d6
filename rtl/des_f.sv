// des_f: the DES round function f(R, K) = P(S(E(R) xor K)).
//
// Combinational. The 32-bit right half is expanded to 48 bits, mixed with the
// 48-bit round key, cut into eight 6-bit slices that go through S-boxes 1..8
// (slice 1 = the most significant bits), and the 32 resulting bits are
// permuted by P.
// The order of the steps and the slice-to-S-box assignment follow the
// document.
module des_f
  import des_pkg::*;
(
  input  half_t r,     // R[i-1]
  input  rkey_t k,     // K[i]
  output half_t f      // f(R[i-1], K[i])
);
  rkey_t e, x;
  half_t s;

  des_expand u_e (.r(r), .e(e));

  assign x = e ^ k;

  for (genvar b = 0; b < 8; b++) begin : g_sbox
    des_sbox #(.BOX(b + 1)) u_s (
      .i (x[47-6*b -: 6]),
      .o (s[31-4*b -: 4])
    );
  end

  des_pperm u_p (.s(s), .p(f));
endmodule
