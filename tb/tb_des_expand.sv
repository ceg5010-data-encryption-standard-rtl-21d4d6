// tb_des_expand: self-checking test of the expansion permutation E. Checks the
// published value E(F0AAF0AA) = 7A15557A1555, the edge wrap (bit 32 to output
// bit 1, bit 1 to output bit 48) and random inputs against the reference.
module tb_des_expand;
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

  half_t r;
  rkey_t e;

  des_expand dut (.r(r), .e(e));

  initial begin
    r = 32'hF0AAF0AA; #1;
    check("E known answer", 64'(e), 64'h7A15557A1555);
    r = 32'h0000_0001; #1;
    check("E wrap of bit 32", 64'(e), 64'h8000_0000_0002);
    r = 32'h8000_0000; #1;
    check("E wrap of bit 1", 64'(e), 64'h4000_0000_0001);
    repeat (300) begin
      r = $urandom(); #1;
      check("E random", 64'(e), 64'(ref_e(r)));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
