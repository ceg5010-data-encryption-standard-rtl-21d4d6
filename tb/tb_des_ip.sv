// tb_des_ip: self-checking test of the initial permutation. Checks the
// published intermediate value IP(0123456789ABCDEF) = CC00CCFF F0AAF0AA, every
// single-bit input against the IP table, and random blocks against the
// reference model.
module tb_des_ip;
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

  block_t pt;
  half_t  l0, r0;

  des_ip dut (.pt(pt), .l0(l0), .r0(r0));

  initial begin
    pt = 64'h0123456789ABCDEF; #1;
    check("IP known answer", {l0, r0}, 64'hCC00CCFF_F0AAF0AA);
    for (int b = 1; b <= 64; b++) begin
      pt = 64'd1 << (64 - b); #1;
      check($sformatf("IP single bit %0d", b), {l0, r0}, ref_ip(pt));
    end
    repeat (200) begin
      pt = rand64(); #1;
      check("IP random", {l0, r0}, ref_ip(pt));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
