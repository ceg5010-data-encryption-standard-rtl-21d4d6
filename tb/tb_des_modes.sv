// tb_des_modes: self-checking test of the ECB/CBC front end with the DES
// pipeline behind it. Expected results come from the reference model with
// the mode equations applied in software. Covers ECB and CBC, encryption and
// decryption, output back-pressure, and checks the rates: ECB returns a
// block every cycle, CBC accepts a block every 16 cycles, and a result
// appears 16 cycles after its block was accepted.
module tb_des_modes;
  import des_pkg::*;
  import des_ref_pkg::*;

  int checks = 0;
  int failures = 0;
  logic clk = 0;
  logic rst_n = 0;

  logic   cfg_valid = 0, cfg_ready, cfg_decrypt = 0;
  block_t cfg_key = '0, cfg_iv = '0;
  mode_e  cfg_mode = MODE_ECB;
  logic   in_valid = 0, in_ready;
  block_t in_data = '0;
  logic   out_valid, out_ready = 1;
  block_t out_data;

  task automatic check(string what, logic [63:0] got, logic [63:0] exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %h expected %h", what, got, exp);
    end
  endtask

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (50000) @(posedge clk);
    failures++;
    $display("FAIL watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  des_modes dut (.*);

  // output monitor
  block_t exp_q[$];
  int     t_in_q[$];
  int     cyc = 0;
  int     accepts[$];          // cycles at which blocks were accepted
  int     outs[$];             // cycles at which results were taken
  bit     stall_seen = 0;
  block_t stalled_data;
  bit     was_stalled = 0;
  bit     random_ready = 0;

  always @(posedge clk) begin
    if (rst_n) begin
      if (was_stalled) check("output held while stalled", out_data, stalled_data);
      was_stalled = out_valid && !out_ready;
      stalled_data = out_data;
      if (was_stalled) stall_seen = 1;
      if (in_valid && in_ready) begin
        accepts.push_back(cyc);
        t_in_q.push_back(cyc);
      end
      if (out_valid && out_ready) begin
        check("mode result", out_data, exp_q.pop_front());
        begin
          int t_in;
          t_in = t_in_q.pop_front();
          if (!random_ready) check("latency 16", 64'(cyc - t_in), 64'd16);
        end
        outs.push_back(cyc);
      end
      cyc++;
    end
  end

  always @(negedge clk) if (random_ready) out_ready = ($urandom_range(0, 2) != 0);

  task automatic configure(block_t key, bit dec, mode_e mode, block_t iv);
    @(negedge clk);
    cfg_valid = 1; cfg_key = key; cfg_decrypt = dec; cfg_mode = mode; cfg_iv = iv;
    @(posedge clk);
    while (!cfg_ready) @(posedge clk);
    @(negedge clk);
    cfg_valid = 0;
  endtask

  task automatic send(block_t blks[]);
    foreach (blks[n]) begin
      @(negedge clk);
      in_valid = 1; in_data = blks[n];
      @(posedge clk);
      while (!in_ready) @(posedge clk);
    end
    @(negedge clk);
    in_valid = 0;
    while (exp_q.size() != 0) @(negedge clk);
  endtask

  initial begin
    block_t key, iv, chain, pts[], cts[];
    int n_blk = 24;
    repeat (3) @(negedge clk);
    rst_n = 1;
    key = rand64(); iv = rand64();
    pts = new[n_blk]; cts = new[n_blk];
    foreach (pts[n]) pts[n] = rand64();

    // ECB encryption, full rate
    configure(key, 0, MODE_ECB, iv);
    foreach (pts[n]) exp_q.push_back(ref_des(key, pts[n], 0));
    outs.delete();
    send(pts);
    check("ECB: results on consecutive cycles", 64'(outs[n_blk-1] - outs[0] + 1), 64'(n_blk));

    // CBC encryption, one block per 16 cycles
    configure(key, 0, MODE_CBC, iv);
    chain = iv;
    foreach (pts[n]) begin
      cts[n] = ref_des(key, pts[n] ^ chain, 0);
      chain = cts[n];
      exp_q.push_back(cts[n]);
    end
    accepts.delete();
    send(pts);
    for (int n = 1; n < n_blk; n++)
      check("CBC: accept interval 16", 64'(accepts[n] - accepts[n-1]), 64'd16);

    // CBC decryption with random back-pressure recovers the plaintext
    configure(key, 1, MODE_CBC, iv);
    foreach (pts[n]) exp_q.push_back(pts[n]);
    random_ready = 1;
    send(cts);

    // ECB decryption with back-pressure
    configure(key, 1, MODE_ECB, iv);
    foreach (pts[n]) exp_q.push_back(ref_des(key, pts[n], 1));
    send(pts);
    random_ready = 0;
    out_ready = 1;

    check("output stall exercised", 64'(stall_seen), 64'd1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
