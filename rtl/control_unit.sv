// control_unit: main control of the single-cycle datapath.
//
// Purely combinational decode of the primary opcode, instruction[31:26], into
// the nine control signals of the datapath. The table implemented is the
// specification's control truth table:
//
//   opcode   RegDst ALUSrc MemtoReg RegWrite MemRead MemWrite Branch ALUOp
//   R-format   1      0       0        1        0       0       0     10
//   lw         0      1       1        1        1       0       0     00
//   sw         x      1       x        0        0       1       0     00
//   beq        x      0       x        0        0       0       1     01
//
// Design choices: the don't-care entries are driven 0, and any other opcode
// decodes to all signals 0 (the instruction does nothing but advance the PC).
//
// Interface: opcode in, ctrl (mips_pkg::ctrl_t) out. No clock; no state.
module control_unit
  import mips_pkg::*;
(
  input  logic [5:0] opcode,
  output ctrl_t      ctrl
);

  always_comb begin
    ctrl = '0;
    unique case (opcode)
      OP_RTYPE: begin
        ctrl.reg_dst   = 1'b1;
        ctrl.reg_write = 1'b1;
        ctrl.alu_op    = ALUOP_RTYPE;
      end
      OP_LW: begin
        ctrl.alu_src    = 1'b1;
        ctrl.mem_to_reg = 1'b1;
        ctrl.reg_write  = 1'b1;
        ctrl.mem_read   = 1'b1;
        ctrl.alu_op     = ALUOP_MEM;
      end
      OP_SW: begin
        ctrl.alu_src   = 1'b1;
        ctrl.mem_write = 1'b1;
        ctrl.alu_op    = ALUOP_MEM;
      end
      OP_BEQ: begin
        ctrl.branch = 1'b1;
        ctrl.alu_op = ALUOP_BEQ;
      end
      default: ctrl = '0;
    endcase
  end

endmodule
