// tb_des_pipe: self-checking test of the 16-stage DES pipeline.
// Runs the published known-answer vectors, then a stream of random blocks
// entered back to back (one per cycle, with gaps and clock-enable stalls
// mixed in), each compared with the reference model. Checks that every result
// leaves exactly 16 enabled cycles after it entered, that the stream keeps one
// block per cycle, and that decrypting the ciphertexts returns the plaintexts.
module tb_des_pipe;
  import des_pkg::*;
  import des_ref_pkg::*;

  int checks = 0;
  int failures = 0;
  logic clk = 0;
  logic rst_n = 0;
  logic ce = 1;
  logic in_valid = 0;
  logic decrypt = 0;
  block_t pt = '0, key = '0, ct;
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

  des_pipe dut (.clk(clk), .rst_n(rst_n), .ce(ce), .in_valid(in_valid), .pt(pt),
                .key(key), .decrypt(decrypt), .out_valid(out_valid), .ct(ct));

  // scoreboard: expected result and the enabled-cycle count at entry
  block_t exp_q[$];
  int     t_q[$];
  int     ecycle = 0;     // enabled cycles so far
  int     got_n = 0;

  always @(posedge clk) begin
    if (rst_n && ce) begin
      if (out_valid) begin
        check("pipeline result", ct, exp_q.pop_front());
        check("latency 16", 64'(ecycle - t_q.pop_front()), 64'd16);
        got_n++;
      end
      if (in_valid) begin
        exp_q.push_back(ref_des(key, pt, decrypt));
        t_q.push_back(ecycle);
      end
      ecycle++;
    end
  end

  task automatic run_blocks(block_t blks[], bit stalls);
    foreach (blks[n]) begin
      @(negedge clk);
      ce = stalls ? ($urandom_range(0, 3) != 0) : 1'b1;
      in_valid = 1; pt = blks[n];
      @(posedge clk);
      while (!ce) begin
        @(negedge clk);
        ce = 1;
        @(posedge clk);
      end
    end
    @(negedge clk);
    in_valid = 0; ce = 1;
    while (exp_q.size() != 0) @(negedge clk);
  endtask

  initial begin
    block_t blks[], cts[];
    repeat (3) @(negedge clk);
    rst_n = 1;

    // known answers
    key = 64'h133457799BBCDFF1;
    blks = '{64'h0123456789ABCDEF};
    run_blocks(blks, 0);
    key = 64'h0E329232EA6D0D73;
    blks = '{64'h8787878787878787};
    run_blocks(blks, 0);

    // back-to-back stream, one block per cycle, with throughput check
    key = rand64();
    blks = new[64];
    foreach (blks[n]) blks[n] = rand64();
    got_n = 0;
    fork
      run_blocks(blks, 0);
      begin
        int c = 0, first = -1, last = -1;
        while (got_n < 64) begin
          @(posedge clk); #1;
          if (out_valid) begin
            if (first < 0) first = c;
            last = c;
          end
          c++;
        end
        check("64 results on 64 consecutive cycles", 64'(last - first + 1), 64'd64);
      end
    join

    // stalls through ce and decryption round trip
    cts = new[blks.size()];
    foreach (blks[n]) cts[n] = ref_des(key, blks[n], 0);
    decrypt = 1;
    run_blocks(cts, 1);
    foreach (cts[n]) check("decrypt(encrypt(x)) = x", ref_des(key, cts[n], 1), blks[n]);

    check("all results returned", 64'(exp_q.size()), 64'd0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
