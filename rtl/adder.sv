// adder: fixed-function W-bit adder.
//
// The datapath uses two of these: one forms PC+1 (the instruction memory is
// word addressed, so the increment is 1 rather than 4), the other adds the
// sign-extended branch offset to PC+1. They only ever add, so a plain adder
// stands in for a general-purpose ALU. The sum wraps modulo 2**W; there is
// no carry out. Combinational. The two adders and the increment of 1 follow
// the specification; dropping the carry out is this design's choice.
module adder #(
  parameter int unsigned W = 8
) (
  input  logic [W-1:0] a,
  input  logic [W-1:0] b,
  output logic [W-1:0] sum
);

  assign sum = a + b;

endmodule
