// tb_des_sbox: self-checking test of the eight S-boxes. All eight are
// instantiated and driven with all 64 inputs. Each output is compared with
// the row/column reading of the table, and the most significant output bit
// of S-box 1 is compared with two 32-bit ROM images published for an FPGA
// implementation (86E67619 for rows 0-1, 869D497A for rows 2-3, address
// b2..b6 with b6 as the least significant bit).
module tb_des_sbox;
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

  logic [5:0] i;
  logic [3:0] o [8];
  logic [31:0] rom_lo, rom_hi;

  for (genvar b = 0; b < 8; b++) begin : g_box
    des_sbox #(.BOX(b + 1)) dut (.i(i), .o(o[b]));
  end

  initial begin
    for (int v = 0; v < 64; v++) begin
      i = 6'(v); #1;
      for (int b = 0; b < 8; b++)
        check($sformatf("S%0d input %0d", b + 1, v), 64'(o[b]), 64'(ref_sbox(b + 1, i)));
      if (v < 32) rom_lo[v] = o[0][3];
      else        rom_hi[v-32] = o[0][3];
    end
    check("S1 MSB, rows 0-1 ROM image", 64'(rom_lo), 64'h86E67619);
    check("S1 MSB, rows 2-3 ROM image", 64'(rom_hi), 64'h869D497A);
    // round-1 S-box inputs of the standard worked example
    i = 6'b011000; #1; check("S1 example", 64'(o[0]), 64'h5);
    i = 6'b100111; #1; check("S8 example", 64'(o[7]), 64'h7);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
