// des_sbox: one DES substitution box, 6 bits in, 4 bits out.
//
// Input bits b1 (MSB) and b6 select one of four rows, b2..b5 one of sixteen
// columns of S-box BOX. The box is built the way a LUT-based FPGA holds it:
// two 32-entry halves, one for rows 0-1 (b1 = 0) and one for rows 2-3
// (b1 = 1), each addressed by b2..b6, and a 2:1 multiplexer on b1 that picks
// between them. Combinational, no clock.
// The tables and the row/column rule follow the document, as does the
// two-halves-and-multiplexer organisation; the BOX parameter is this
// design's way of selecting one of the eight boxes.
module des_sbox
  import des_pkg::*;
#(
  parameter int unsigned BOX = 1   // which S-box, 1..8
) (
  input  logic [5:0] i,            // {b1, b2, b3, b4, b5, b6}
  output logic [3:0] o             // substituted nibble, MSB first
);
  logic [3:0] lower, upper;
  logic [3:0] col;

  assign col = i[4:1];

  // rows {0,b6} and {1,b6}
  assign lower = SBOX_TAB[BOX-1][{1'b0, i[0], col}];
  assign upper = SBOX_TAB[BOX-1][{1'b1, i[0], col}];
  assign o     = i[5] ? upper : lower;

  initial begin
    assert (BOX >= 1 && BOX <= 8) else $error("des_sbox: BOX must be 1..8");
  end
endmodule
