// tb_rc5_64_16: self-checking test of rc5_core at the larger RC5 size,
// 64-bit words and 16 rounds. Random expanded-key words and blocks are
// encrypted and decrypted and compared with a 64-bit software model;
// decryption must return the plaintext and each block must take R+1 = 17
// cycles.
module tb_rc5_64_16;
  import rc5_ref_pkg::*;

  localparam int W = 64;
  localparam int R = 16;

  int checks = 0;
  int failures = 0;
  logic clk = 0;
  logic rst_n = 0;
  logic start = 0, decrypt = 0, busy, done;
  logic [W-1:0] a_in = '0, b_in = '0, a_out, b_out;
  logic [2*R+1:0][W-1:0] s;

  task automatic check(string what, logic [127:0] got, logic [127:0] exp);
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

  rc5_core #(.W(W), .R(R)) dut (.*);

  task automatic run(bit dec, logic [W-1:0] a, logic [W-1:0] b,
                     output logic [W-1:0] ya, output logic [W-1:0] yb);
    int cycles;
    @(negedge clk);
    start = 1; decrypt = dec; a_in = a; b_in = b;
    @(negedge clk);
    start = 0; a_in = '0; b_in = '0;
    cycles = 1;
    while (!done) begin
      @(negedge clk);
      cycles++;
    end
    check("cycles per block", 128'(cycles), 128'(R + 1));
    ya = a_out; yb = b_out;
  endtask

  initial begin
    logic [63:0] sk[];
    logic [63:0] a, b, ea, eb, ya, yb, za, zb;
    sk = new[2*R+2];
    s = '0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    repeat (40) begin
      foreach (sk[n]) begin
        sk[n] = {$urandom(), $urandom()};
        s[n] = sk[n];
      end
      a = {$urandom(), $urandom()}; b = {$urandom(), $urandom()};
      ea = a; eb = b;
      ref_rc5_64(sk, R, 0, ea, eb);
      run(0, a, b, ya, yb);
      check("RC5-64 encrypt", {ya, yb}, {ea, eb});
      run(1, ya, yb, za, zb);
      check("RC5-64 decrypt returns plaintext", {za, zb}, {a, b});
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
