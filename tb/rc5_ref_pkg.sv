// rc5_ref_pkg: behavioural RC5 references for the testbenches, written
// directly from the round equations, for 32-bit and for 64-bit words.
package rc5_ref_pkg;
  function automatic logic [31:0] rol32(logic [31:0] x, logic [31:0] n);
    int s = int'(n[4:0]);
    return (s == 0) ? x : ((x << s) | (x >> (32 - s)));
  endfunction

  function automatic logic [31:0] ror32(logic [31:0] x, logic [31:0] n);
    int s = int'(n[4:0]);
    return (s == 0) ? x : ((x >> s) | (x << (32 - s)));
  endfunction

  // s holds S[0..2r+1]
  function automatic void ref_rc5(input logic [31:0] s[], input int r, input bit dec,
                                  inout logic [31:0] a, inout logic [31:0] b);
    if (!dec) begin
      a = a + s[0];
      b = b + s[1];
      for (int i = 1; i <= r; i++) begin
        a = rol32(a ^ b, b) + s[2*i];
        b = rol32(b ^ a, a) + s[2*i+1];
      end
    end else begin
      for (int i = r; i >= 1; i--) begin
        b = ror32(b - s[2*i+1], a) ^ a;
        a = ror32(a - s[2*i], b) ^ b;
      end
      b = b - s[1];
      a = a - s[0];
    end
  endfunction

  function automatic logic [63:0] rol64(logic [63:0] x, logic [63:0] n);
    int s = int'(n[5:0]);
    return (s == 0) ? x : ((x << s) | (x >> (64 - s)));
  endfunction

  function automatic logic [63:0] ror64(logic [63:0] x, logic [63:0] n);
    int s = int'(n[5:0]);
    return (s == 0) ? x : ((x >> s) | (x << (64 - s)));
  endfunction

  function automatic void ref_rc5_64(input logic [63:0] s[], input int r, input bit dec,
                                     inout logic [63:0] a, inout logic [63:0] b);
    if (!dec) begin
      a = a + s[0];
      b = b + s[1];
      for (int i = 1; i <= r; i++) begin
        a = rol64(a ^ b, b) + s[2*i];
        b = rol64(b ^ a, a) + s[2*i+1];
      end
    end else begin
      for (int i = r; i >= 1; i--) begin
        b = ror64(b - s[2*i+1], a) ^ a;
        a = ror64(a - s[2*i], b) ^ b;
      end
      b = b - s[1];
      a = a - s[0];
    end
  endfunction
endpackage
