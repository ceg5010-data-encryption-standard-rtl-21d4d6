// tb_rc5_core: self-checking test of the iterative RC5-32/12 core.
// Random expanded-key words and blocks are encrypted and decrypted; each
// result is compared with a software model of the round equations, each
// decryption must return the original block, and each operation must take
// R+1 = 13 cycles from start to done.
module tb_rc5_core;
  import rc5_ref_pkg::*;

  localparam int W = 32;
  localparam int R = 12;

  int checks = 0;
  int failures = 0;
  logic clk = 0;
  logic rst_n = 0;
  logic start = 0, decrypt = 0, busy, done;
  logic [W-1:0] a_in = '0, b_in = '0, a_out, b_out;
  logic [2*R+1:0][W-1:0] s;

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

  rc5_core dut (.*);

  task automatic run(bit dec, logic [W-1:0] a, logic [W-1:0] b,
                     output logic [W-1:0] ya, output logic [W-1:0] yb);
    int cycles = 0;
    @(negedge clk);
    start = 1; decrypt = dec; a_in = a; b_in = b;
    @(negedge clk);
    start = 0; a_in = '0; b_in = '0;
    cycles = 1;
    while (!done) begin
      @(negedge clk);
      cycles++;
    end
    check("cycles per block", 64'(cycles), 64'(R + 1));
    ya = a_out; yb = b_out;
  endtask

  initial begin
    logic [31:0] sk[];
    logic [31:0] a, b, ea, eb, ya, yb, za, zb;
    sk = new[2*R+2];
    s = '0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    repeat (40) begin
      foreach (sk[n]) begin
        sk[n] = $urandom();
        s[n] = sk[n];
      end
      a = $urandom(); b = $urandom();
      ea = a; eb = b;
      ref_rc5(sk, R, 0, ea, eb);
      run(0, a, b, ya, yb);
      check("RC5 encrypt", {ya, yb}, {ea, eb});
      run(1, ya, yb, za, zb);
      check("RC5 decrypt returns plaintext", {za, zb}, {a, b});
    end
    // rotation by 0 and by 31
    foreach (sk[n]) begin sk[n] = 0; s[n] = 0; end
    a = 32'h0000_001F; b = 32'h0000_0000;
    ea = a; eb = b;
    ref_rc5(sk, R, 0, ea, eb);
    run(0, a, b, ya, yb);
    check("RC5 encrypt, zero key words", {ya, yb}, {ea, eb});
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
