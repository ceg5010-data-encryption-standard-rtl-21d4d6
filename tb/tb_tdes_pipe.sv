// tb_tdes_pipe: self-checking test of the Triple DES (EDE) pipeline.
// Streams random blocks, one per cycle, with three random keys and with the
// two-key variant (key3 = key1), compares each result with
// DES(key3, DES^-1(key2, DES(key1, pt))) from the reference model, checks the
// 48-cycle latency, and checks that three equal keys reduce to single DES
// (published vector 0123456789ABCDEF / 133457799BBCDFF1 -> 85E813540F0AB405).
module tb_tdes_pipe;
  import des_pkg::*;
  import des_ref_pkg::*;

  int checks = 0;
  int failures = 0;
  logic clk = 0;
  logic rst_n = 0;
  logic ce = 1;
  logic in_valid = 0;
  block_t pt = '0, key1 = '0, key2 = '0, key3 = '0, ct;
  logic out_valid;

  task automatic check(string what, logic [63:0] got, logic [63:0] exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %h expected %h", what, got, exp);
    end
  endtask

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (20000) @(posedge clk);
    failures++;
    $display("FAIL watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  tdes_pipe dut (.*);

  block_t exp_q[$];
  int     t_q[$];
  int     cyc = 0;

  always @(posedge clk) begin
    if (rst_n && ce) begin
      if (out_valid) begin
        int t;
        check("triple DES result", ct, exp_q.pop_front());
        t = t_q.pop_front();
        check("latency 48", 64'(cyc - t), 64'd48);
      end
      if (in_valid) begin
        exp_q.push_back(ref_des(key3, ref_des(key2, ref_des(key1, pt, 0), 1), 0));
        t_q.push_back(cyc);
      end
      cyc++;
    end
  end

  task automatic stream(int n);
    repeat (n) begin
      @(negedge clk);
      in_valid = 1; pt = rand64();
    end
    @(negedge clk);
    in_valid = 0;
    while (exp_q.size() != 0) @(negedge clk);
  endtask

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1;
    key1 = rand64(); key2 = rand64(); key3 = rand64();
    stream(40);
    key3 = key1;                       // two-key variant
    stream(40);
    key1 = 64'h133457799BBCDFF1; key2 = key1; key3 = key1;
    @(negedge clk);
    in_valid = 1; pt = 64'h0123456789ABCDEF;
    @(negedge clk);
    in_valid = 0;
    while (!out_valid) @(negedge clk);
    check("equal keys give single DES", ct, 64'h85E813540F0AB405);
    while (exp_q.size() != 0) @(negedge clk);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
