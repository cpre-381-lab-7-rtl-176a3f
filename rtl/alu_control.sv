// alu_control: ALU control unit of the single-cycle datapath.
//
// Combinational. Combines the 2-bit ALUOp from the main control with the
// function field, instruction[5:0], into the 3-bit ALU operation, following
// the specification's ALU control truth table:
//
//   ALUOp  funct[3:0]  operation
//   00     xxxx        010 (add, lw/sw address)
//   x1     xxxx        110 (subtract, beq compare)
//   1x     0000        010 (add)
//   1x     0010        110 (subtract)
//   1x     0100        000 (and)
//   1x     0101        001 (or)
//   1x     1010        111 (set on less than)
//
// As in the table, funct[5:4] are not looked at, and ALUOp[0] takes priority
// over ALUOp[1]. Design choice: an R-format funct the table does not list
// gives 010 (add).
//
// Interface: alu_op (mips_pkg::aluop_e), funct in; op (mips_pkg::alu_op_e) out.
module alu_control
  import mips_pkg::*;
(
  input  aluop_e     alu_op,
  input  logic [5:0] funct,
  output alu_op_e    op
);

  always_comb begin
    if (alu_op[0]) begin
      op = ALU_SUB;
    end else if (alu_op[1]) begin
      unique case (funct[3:0])
        4'b0000: op = ALU_ADD;
        4'b0010: op = ALU_SUB;
        4'b0100: op = ALU_AND;
        4'b0101: op = ALU_OR;
        4'b1010: op = ALU_SLT;
        default: op = ALU_ADD;
      endcase
    end else begin
      op = ALU_ADD;
    end
  end

endmodule
