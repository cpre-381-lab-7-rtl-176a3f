// alu: general-purpose ALU of the datapath.
//
// Computes y from operands a and b for the 3-bit operation chosen by the ALU
// control unit, and raises zero when y is 0 (beq subtracts its two registers
// and branches on zero). The operation codes are those the ALU control emits:
//
//   000 a AND b     001 a OR b     010 a + b     110 a - b
//   111 set on less than: 1 if a < b as signed numbers, else 0
//
// The three remaining codes are never produced and give 0. Add and subtract
// wrap modulo 2**W. Combinational; W is the datapath width. The operation
// codes come from the specification's ALU control table, which names no
// operation; the meanings above (the standard MIPS ones), the result 0 for
// unused codes and the absence of overflow detection are this design's.
module alu
  import mips_pkg::*;
#(
  parameter int unsigned W = 32
) (
  input  alu_op_e      op,
  input  logic [W-1:0] a,
  input  logic [W-1:0] b,
  output logic [W-1:0] y,
  output logic         zero
);

  always_comb begin
    unique case (op)
      ALU_AND: y = a & b;
      ALU_OR:  y = a | b;
      ALU_ADD: y = a + b;
      ALU_SUB: y = a - b;
      ALU_SLT: y = W'($signed(a) < $signed(b));
      default: y = '0;
    endcase
  end

  assign zero = (y == '0);

endmodule
