// tb_des_pperm: self-checking test of the P permutation. Checks the published
// round-1 value P(5C82B597) = 234AA9BB, every single bit, and random inputs.
module tb_des_pperm;
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

  half_t s, p;

  des_pperm dut (.s(s), .p(p));

  initial begin
    s = 32'h5C82B597; #1;
    check("P known answer", 64'(p), 64'h234AA9BB);
    for (int b = 1; b <= 32; b++) begin
      s = 32'd1 << (32 - b); #1;
      check($sformatf("P single bit %0d", b), 64'(p), 64'(ref_p(s)));
    end
    repeat (200) begin
      s = $urandom(); #1;
      check("P random", 64'(p), 64'(ref_p(s)));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
