// des_ref_pkg: behavioural DES reference for the testbenches.
//
// Written as plain sequential software over 1-based bit arrays, with its own
// loop-based rotations and S-box indexing, so that it shares no structure
// with the RTL. It reads the same standard tables from des_pkg; those are
// checked independently by the published known-answer vectors in the
// testbenches.
package des_ref_pkg;
  import des_pkg::*;

  // bit b (1 = MSB) of a W-bit value
  function automatic logic get_bit(logic [63:0] x, int w, int b);
    return x[w-b];
  endfunction

  function automatic logic [63:0] permute(logic [63:0] x, int win, int wout,
                                          const ref int unsigned tab[]);
    logic [63:0] y = '0;
    for (int n = 1; n <= wout; n++)
      y[wout-n] = get_bit(x, win, int'(tab[n-1]));
    return y;
  endfunction

  function automatic logic [63:0] ref_ip(logic [63:0] x);
    int unsigned t[] = new[64];
    foreach (t[n]) t[n] = IP_TAB[n];
    return permute(x, 64, 64, t);
  endfunction

  function automatic logic [63:0] ref_fp(logic [63:0] x);
    int unsigned t[] = new[64];
    foreach (t[n]) t[n] = FP_TAB[n];
    return permute(x, 64, 64, t);
  endfunction

  function automatic logic [47:0] ref_e(logic [31:0] x);
    int unsigned t[] = new[48];
    foreach (t[n]) t[n] = E_TAB[n];
    return 48'(permute(64'(x), 32, 48, t));
  endfunction

  function automatic logic [31:0] ref_p(logic [31:0] x);
    int unsigned t[] = new[32];
    foreach (t[n]) t[n] = P_TAB[n];
    return 32'(permute(64'(x), 32, 32, t));
  endfunction

  function automatic logic [3:0] ref_sbox(int box, logic [5:0] v);
    int row, col;
    row = 2 * int'(v[5]) + int'(v[0]);
    col = int'(v[4:1]);
    return SBOX_TAB[box-1][row*16 + col];
  endfunction

  function automatic logic [31:0] ref_f(logic [31:0] r, logic [47:0] k);
    logic [47:0] x;
    logic [31:0] s;
    x = ref_e(r) ^ k;
    for (int b = 1; b <= 8; b++)
      s[32-4*b +: 4] = ref_sbox(b, x[48-6*b +: 6]);
    return ref_p(s);
  endfunction

  // round keys K[1..16] in kk[0..15]
  function automatic void ref_subkeys(logic [63:0] key, output logic [47:0] kk[16]);
    int unsigned t1[] = new[56];
    int unsigned t2[] = new[48];
    logic [55:0] cd;
    logic [27:0] c, d;
    foreach (t1[n]) t1[n] = PC1_TAB[n];
    foreach (t2[n]) t2[n] = PC2_TAB[n];
    cd = 56'(permute(key, 64, 56, t1));
    c = cd[55:28];
    d = cd[27:0];
    for (int i = 0; i < 16; i++) begin
      for (int s = 0; s < int'(ROT_TAB[i]); s++) begin
        c = {c[26:0], c[27]};
        d = {d[26:0], d[27]};
      end
      kk[i] = 48'(permute(64'({c, d}), 56, 48, t2));
    end
  endfunction

  function automatic logic [63:0] ref_des(logic [63:0] key, logic [63:0] blk, bit dec);
    logic [47:0] kk[16];
    logic [63:0] x;
    logic [31:0] l, r, t;
    ref_subkeys(key, kk);
    x = ref_ip(blk);
    l = x[63:32];
    r = x[31:0];
    for (int i = 0; i < 16; i++) begin
      t = r;
      r = l ^ ref_f(r, dec ? kk[15-i] : kk[i]);
      l = t;
    end
    return ref_fp({r, l});
  endfunction

  function automatic logic [63:0] rand64();
    return {$urandom(), $urandom()};
  endfunction
endpackage
