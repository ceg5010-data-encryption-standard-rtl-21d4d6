// tb_des_round: self-checking test of one registered DES round. Checks the
// published round-1 result L1 R1 = F0AAF0AA EF4A6544, that the result
// appears one clock edge after the inputs, that ce low holds the register,
// and random inputs against the reference.
module tb_des_round;
  import des_pkg::*;
  import des_ref_pkg::*;

  int checks = 0;
  int failures = 0;
  logic clk = 0;
  logic ce;
  half_t li, ri, lo, ro;
  rkey_t k;

  task automatic check(string what, logic [63:0] got, logic [63:0] exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %h expected %h", what, got, exp);
    end
  endtask

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (5000) @(posedge clk);
    failures++;
    $display("FAIL watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  des_round dut (.clk(clk), .ce(ce), .li(li), .ri(ri), .k(k), .lo(lo), .ro(ro));

  initial begin
    ce = 1;
    li = 32'hCC00CCFF; ri = 32'hF0AAF0AA; k = 48'h1B02EFFC7072;
    @(posedge clk); #1;
    check("round 1 known answer", {lo, ro}, 64'hF0AAF0AA_EF4A6544);
    // inputs change: outputs must wait for the next edge
    li = 32'h0; ri = 32'h0; #1;
    check("output registered", {lo, ro}, 64'hF0AAF0AA_EF4A6544);
    ce = 0;
    @(posedge clk); #1;
    check("ce low holds", {lo, ro}, 64'hF0AAF0AA_EF4A6544);
    ce = 1;
    repeat (300) begin
      half_t l, r;
      l = $urandom(); r = $urandom(); k = 48'(rand64());
      li = l; ri = r;
      @(posedge clk); #1;
      check("round random", {lo, ro}, {r, l ^ ref_f(r, k)});
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
