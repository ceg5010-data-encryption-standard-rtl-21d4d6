// tdes_pipe: pipelined Triple DES (EDE) encryption.
//
// ct = DES(key3, DES^-1(key2, DES(key1, pt))). Three des_pipe instances are
// chained: the first encrypts with key1, the second decrypts with key2 and
// the third encrypts with key3. Setting key3 = key1 gives the two-key
// variant. Like des_pipe it accepts one block per cycle (ce high) and
// returns it 48 cycles later; the keys must stay constant while blocks are
// in flight. The equation is the document's; the pipelined three-stage
// construction from the DES pipeline is this design's choice.
module tdes_pipe
  import des_pkg::*;
(
  input  logic   clk,
  input  logic   rst_n,      // asynchronous, active-low reset of valid flags
  input  logic   ce,         // clock enable of all 48 stages
  input  logic   in_valid,
  input  block_t pt,
  input  block_t key1,
  input  block_t key2,
  input  block_t key3,
  output logic   out_valid,
  output block_t ct
);
  block_t s1, s2;
  logic   v1, v2;

  des_pipe u_e1 (.clk(clk), .rst_n(rst_n), .ce(ce), .in_valid(in_valid), .pt(pt),
                 .key(key1), .decrypt(1'b0), .out_valid(v1), .ct(s1));
  des_pipe u_d2 (.clk(clk), .rst_n(rst_n), .ce(ce), .in_valid(v1), .pt(s1),
                 .key(key2), .decrypt(1'b1), .out_valid(v2), .ct(s2));
  des_pipe u_e3 (.clk(clk), .rst_n(rst_n), .ce(ce), .in_valid(v2), .pt(s2),
                 .key(key3), .decrypt(1'b0), .out_valid(out_valid), .ct(ct));
endmodule
