// tb_des_fp: self-checking test of the final permutation IP^-1. Checks the
// published last step R16 L16 = 0A4CD995 43423234 -> 85E813540F0AB405, that
// IP^-1 undoes IP for random blocks, and every single-bit input against the
// reference.
module tb_des_fp;
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

  half_t  l, r;
  block_t ct;

  des_fp dut (.l(l), .r(r), .ct(ct));

  initial begin
    l = 32'h0A4CD995; r = 32'h43423234; #1;
    check("FP known answer", ct, 64'h85E813540F0AB405);
    for (int b = 1; b <= 64; b++) begin
      {l, r} = 64'd1 << (64 - b); #1;
      check($sformatf("FP single bit %0d", b), ct, ref_fp({l, r}));
    end
    repeat (200) begin
      block_t x;
      x = rand64();
      {l, r} = ref_ip(x); #1;
      check("FP(IP(x)) = x", ct, x);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
