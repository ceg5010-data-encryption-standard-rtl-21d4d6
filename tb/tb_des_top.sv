// tb_des_top: end-to-end test of the whole design at its default sizes.
// The DES engine encrypts a message in ECB mode at full rate, then encrypts
// and decrypts it in CBC mode under output back-pressure; the Triple DES
// pipeline streams blocks with clock-enable pauses; the RC5 core encrypts
// and decrypts blocks. All results are compared with software models. The
// test also counts how often each mechanism happened (ECB streaming, CBC
// chaining with the result forwarded to the next block in the same cycle,
// output stall, configuration change, decryption, Triple DES pause, RC5 in
// both directions) and counts a failure for any that never happened.
module tb_des_top;
  import des_pkg::*;
  import des_ref_pkg::*;
  import rc5_ref_pkg::*;

  localparam int RW = 32;
  localparam int RR = 12;

  int checks = 0;
  int failures = 0;
  logic clk = 0;
  logic rst_n = 0;

  logic   des_cfg_valid = 0, des_cfg_ready, des_cfg_decrypt = 0;
  block_t des_cfg_key = '0, des_cfg_iv = '0;
  mode_e  des_cfg_mode = MODE_ECB;
  logic   des_in_valid = 0, des_in_ready;
  block_t des_in_data = '0;
  logic   des_out_valid, des_out_ready = 1;
  block_t des_out_data;

  logic   tdes_ce = 1, tdes_in_valid = 0, tdes_out_valid;
  block_t tdes_pt = '0, tdes_key1 = '0, tdes_key2 = '0, tdes_key3 = '0, tdes_ct;

  logic rc5_start = 0, rc5_decrypt = 0, rc5_busy, rc5_done;
  logic [RW-1:0] rc5_a_in = '0, rc5_b_in = '0, rc5_a_out, rc5_b_out;
  logic [2*RR+1:0][RW-1:0] rc5_s = '0;

  task automatic check(string what, logic [63:0] got, logic [63:0] exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %h expected %h", what, got, exp);
    end
  endtask

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (100000) @(posedge clk);
    failures++;
    $display("FAIL watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  des_top dut (.*);

  // ---------------- mechanism counters ----------------
  int n_ecb_stream = 0;     // ECB results on consecutive cycles
  int n_cbc_forward = 0;    // CBC block accepted as the previous one leaves
  int n_stall = 0;          // cycles with a result held by out_ready low
  int n_cfg = 0;            // configuration loads
  int n_decrypt = 0;        // DES blocks decrypted
  int n_tdes_pause = 0;     // Triple DES cycles with ce low
  int n_rc5_enc = 0, n_rc5_dec = 0;

  mode_e cur_mode = MODE_ECB;
  bit    cur_dec = 0;
  bit    prev_out = 0;

  // ---------------- DES engine scoreboard ----------------
  block_t des_exp_q[$];

  always @(posedge clk) begin
    if (rst_n) begin
      if (des_cfg_valid && des_cfg_ready) n_cfg++;
      if (des_out_valid && !des_out_ready) n_stall++;
      if (cur_mode == MODE_CBC && des_in_valid && des_in_ready && des_out_valid && des_out_ready)
        n_cbc_forward++;
      if (des_out_valid && des_out_ready) begin
        check("DES engine result", des_out_data, des_exp_q.pop_front());
        if (cur_dec) n_decrypt++;
        if (cur_mode == MODE_ECB && prev_out) n_ecb_stream++;
      end
      prev_out = des_out_valid && des_out_ready;
      if (!tdes_ce) n_tdes_pause++;
    end
  end

  task automatic des_configure(block_t key, bit dec, mode_e mode, block_t iv);
    @(negedge clk);
    des_cfg_valid = 1; des_cfg_key = key; des_cfg_decrypt = dec;
    des_cfg_mode = mode; des_cfg_iv = iv;
    @(posedge clk);
    while (!des_cfg_ready) @(posedge clk);
    @(negedge clk);
    des_cfg_valid = 0;
    cur_mode = mode; cur_dec = dec;
  endtask

  task automatic des_send(block_t blks[], bit backpressure);
    fork
      begin
        foreach (blks[n]) begin
          @(negedge clk);
          des_in_valid = 1; des_in_data = blks[n];
          @(posedge clk);
          while (!des_in_ready) @(posedge clk);
        end
        @(negedge clk);
        des_in_valid = 0;
      end
      begin
        while (des_in_valid || des_exp_q.size() != 0) begin
          @(negedge clk);
          des_out_ready = backpressure ? ($urandom_range(0, 3) != 0) : 1'b1;
        end
        des_out_ready = 1;
      end
    join
    while (des_exp_q.size() != 0) @(negedge clk);
  endtask

  // ---------------- Triple DES scoreboard ----------------
  block_t tdes_exp_q[$];

  always @(posedge clk) begin
    if (rst_n && tdes_ce) begin
      if (tdes_out_valid) check("Triple DES result", tdes_ct, tdes_exp_q.pop_front());
      if (tdes_in_valid)
        tdes_exp_q.push_back(ref_des(tdes_key3, ref_des(tdes_key2,
                             ref_des(tdes_key1, tdes_pt, 0), 1), 0));
    end
  end

  task automatic tdes_run(int n);
    tdes_key1 = rand64(); tdes_key2 = rand64(); tdes_key3 = rand64();
    repeat (n) begin
      @(negedge clk);
      tdes_ce = ($urandom_range(0, 4) != 0);
      tdes_in_valid = 1; tdes_pt = rand64();
      @(posedge clk);
      while (!tdes_ce) begin
        @(negedge clk);
        tdes_ce = 1;
        @(posedge clk);
      end
    end
    @(negedge clk);
    tdes_in_valid = 0; tdes_ce = 1;
    while (tdes_exp_q.size() != 0) @(negedge clk);
  endtask

  // ---------------- RC5 ----------------
  task automatic rc5_run(int n);
    logic [31:0] sk[];
    logic [31:0] a, b, ea, eb;
    sk = new[2*RR+2];
    foreach (sk[i]) begin
      sk[i] = $urandom();
      rc5_s[i] = sk[i];
    end
    repeat (n) begin
      for (int dir = 0; dir < 2; dir++) begin
        a = $urandom(); b = $urandom();
        ea = a; eb = b;
        ref_rc5(sk, RR, dir[0], ea, eb);
        @(negedge clk);
        rc5_start = 1; rc5_decrypt = dir[0]; rc5_a_in = a; rc5_b_in = b;
        @(negedge clk);
        rc5_start = 0;
        while (!rc5_done) @(negedge clk);
        check("RC5 result", {rc5_a_out, rc5_b_out}, {ea, eb});
        if (dir == 0) n_rc5_enc++;
        else n_rc5_dec++;
      end
    end
  endtask

  task automatic expect_seen(string what, int n);
    checks++;
    $display("mechanism %-28s %0d", what, n);
    if (n == 0) begin
      failures++;
      $display("FAIL mechanism never exercised: %s", what);
    end
  endtask

  initial begin
    block_t key, iv, chain, msg[], cts[];
    int n_blk = 32;
    repeat (3) @(negedge clk);
    rst_n = 1;
    key = rand64(); iv = rand64();
    msg = new[n_blk]; cts = new[n_blk];
    foreach (msg[n]) msg[n] = rand64();

    fork
      begin
        // published vector through the engine
        des_configure(64'h133457799BBCDFF1, 0, MODE_ECB, '0);
        des_exp_q.push_back(64'h85E813540F0AB405);
        begin
          block_t one[] = '{64'h0123456789ABCDEF};
          des_send(one, 0);
        end
        // ECB message at full rate
        des_configure(key, 0, MODE_ECB, iv);
        foreach (msg[n]) des_exp_q.push_back(ref_des(key, msg[n], 0));
        des_send(msg, 0);
        // CBC encryption
        des_configure(key, 0, MODE_CBC, iv);
        chain = iv;
        foreach (msg[n]) begin
          cts[n] = ref_des(key, msg[n] ^ chain, 0);
          chain = cts[n];
          des_exp_q.push_back(cts[n]);
        end
        des_send(msg, 0);
        // CBC decryption with back-pressure gives the message back
        des_configure(key, 1, MODE_CBC, iv);
        foreach (msg[n]) des_exp_q.push_back(msg[n]);
        des_send(cts, 1);
        // ECB decryption with back-pressure
        des_configure(key, 1, MODE_ECB, iv);
        foreach (cts[n]) des_exp_q.push_back(ref_des(key, cts[n], 1));
        des_send(cts, 1);
      end
      tdes_run(100);
      rc5_run(10);
    join

    expect_seen("ECB streaming", n_ecb_stream);
    expect_seen("CBC forwarding", n_cbc_forward);
    expect_seen("output stall", n_stall);
    expect_seen("configuration load", n_cfg);
    expect_seen("DES decryption", n_decrypt);
    expect_seen("Triple DES pause", n_tdes_pause);
    expect_seen("RC5 encryption", n_rc5_enc);
    expect_seen("RC5 decryption", n_rc5_dec);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
