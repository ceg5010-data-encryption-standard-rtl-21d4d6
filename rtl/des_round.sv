// des_round: one pipelined DES round.
//
// L[i] = R[i-1] and R[i] = L[i-1] xor f(R[i-1], K[i]) are computed
// combinationally and captured in a 64-bit register on the rising clock edge
// when the clock enable ce is high; with ce low the stage holds. The outputs
// are therefore one cycle behind the inputs. The data register has no reset:
// a valid flag travelling beside the data says when it is meaningful.
// The round equations, the clock enable and the register after every round
// follow the document; having no data reset is this design's choice.
module des_round
  import des_pkg::*;
(
  input  logic  clk,
  input  logic  ce,    // clock enable of the stage register
  input  half_t li,    // L[i-1]
  input  half_t ri,    // R[i-1]
  input  rkey_t k,     // K[i]
  output half_t lo,    // L[i], registered
  output half_t ro     // R[i], registered
);
  half_t f;

  des_f u_f (.r(ri), .k(k), .f(f));

  always_ff @(posedge clk) begin
    if (ce) begin
      lo <= ri;
      ro <= li ^ f;
    end
  end
endmodule
