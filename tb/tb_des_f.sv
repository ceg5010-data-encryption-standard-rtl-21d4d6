// tb_des_f: self-checking test of the round function f. Checks the published
// round-1 value f(F0AAF0AA, K1 = 1B02EFFC7072) = 234AA9BB and random
// inputs against the reference.
module tb_des_f;
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

  half_t r, f;
  rkey_t k;

  des_f dut (.r(r), .k(k), .f(f));

  initial begin
    r = 32'hF0AAF0AA; k = 48'h1B02EFFC7072; #1;
    check("f known answer", 64'(f), 64'h234AA9BB);
    repeat (500) begin
      r = $urandom(); k = 48'(rand64()); #1;
      check("f random", 64'(f), 64'(ref_f(r, k)));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
