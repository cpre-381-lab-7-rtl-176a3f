// mux2: W-bit two-input multiplexer.
//
// y = d0 when sel is 0, d1 when sel is 1. The datapath uses four: the
// write-register select (RegDst), the ALU second operand (ALUSrc), the
// register write-back value (MemtoReg) and the next PC (branch taken).
// Combinational. Which value sits on input 0 and which on input 1 follows
// the specification's datapath diagram.
module mux2 #(
  parameter int unsigned W = 32
) (
  input  logic         sel,
  input  logic [W-1:0] d0,
  input  logic [W-1:0] d1,
  output logic [W-1:0] y
);

  assign y = sel ? d1 : d0;

endmodule
