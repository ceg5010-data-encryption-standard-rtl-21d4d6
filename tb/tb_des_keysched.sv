// tb_des_keysched: self-checking test of the key schedule. Checks the
// published round keys K1 = 1B02EFFC7072 and K16 = CB3D8B0E17F5 of key
// 133457799BBCDFF1, that the parity bits have no effect, that decryption
// reverses the order, and random keys against the reference.
module tb_des_keysched;
  import des_pkg::*;
  import des_ref_pkg::*;

  int checks = 0;
  int failures = 0;

  task automatic check(string what, logic [63:0] got, logic [63:0] exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %h expected %h", what, got, exp);
    end
  endtask

  initial begin : watchdog
    #10ms;
    failures++;
    $display("FAIL watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  block_t key;
  logic   decrypt;
  rkey_t [15:0] rk;
  logic [47:0] kk[16];

  des_keysched dut (.key(key), .decrypt(decrypt), .rk(rk));

  initial begin
    key = 64'h133457799BBCDFF1; decrypt = 0; #1;
    check("K1 known answer", 64'(rk[0]), 64'h1B02EFFC7072);
    check("K16 known answer", 64'(rk[15]), 64'hCB3D8B0E17F5);
    decrypt = 1; #1;
    check("decrypt round 1 gets K16", 64'(rk[0]), 64'hCB3D8B0E17F5);
    check("decrypt round 16 gets K1", 64'(rk[15]), 64'h1B02EFFC7072);
    repeat (50) begin
      rkey_t [15:0] a;
      key = rand64(); decrypt = 0; #1;
      a = rk;
      key = key ^ 64'h0101010101010101; #1;
      check("parity bits ignored", 64'(rk == a), 64'd1);
      ref_subkeys(key, kk);
      for (int n = 0; n < 16; n++)
        check($sformatf("K%0d random", n + 1), 64'(rk[n]), 64'(kk[n]));
      decrypt = 1; #1;
      for (int n = 0; n < 16; n++)
        check($sformatf("decrypt key %0d", n + 1), 64'(rk[n]), 64'(kk[15-n]));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
