// tb_control_unit: exhaustive check of the main control decode.
//
// Applies all 64 opcodes and compares every control signal with the
// expected table: the four listed instructions get their rows (don't cares
// are not compared), every other opcode must assert nothing that writes
// state or branches.
module tb_control_unit;
  import mips_pkg::*;

  logic [5:0] opcode;
  ctrl_t      ctrl;
  int checks = 0, failures = 0;

  control_unit dut (.opcode, .ctrl);

  task automatic expect_bit(string what, logic got, logic exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL opcode=%b %s got %b expected %b", opcode, what, got, exp);
    end
  endtask

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int op = 0; op < 64; op++) begin
      opcode = 6'(op);
      #1;
      case (opcode)
        6'b000000: begin
          expect_bit("RegDst", ctrl.reg_dst, 1); expect_bit("ALUSrc", ctrl.alu_src, 0);
          expect_bit("MemtoReg", ctrl.mem_to_reg, 0); expect_bit("RegWrite", ctrl.reg_write, 1);
          expect_bit("MemRead", ctrl.mem_read, 0); expect_bit("MemWrite", ctrl.mem_write, 0);
          expect_bit("Branch", ctrl.branch, 0);
          expect_bit("ALUOp1", ctrl.alu_op[1], 1); expect_bit("ALUOp0", ctrl.alu_op[0], 0);
        end
        6'b100011: begin
          expect_bit("RegDst", ctrl.reg_dst, 0); expect_bit("ALUSrc", ctrl.alu_src, 1);
          expect_bit("MemtoReg", ctrl.mem_to_reg, 1); expect_bit("RegWrite", ctrl.reg_write, 1);
          expect_bit("MemRead", ctrl.mem_read, 1); expect_bit("MemWrite", ctrl.mem_write, 0);
          expect_bit("Branch", ctrl.branch, 0);
          expect_bit("ALUOp1", ctrl.alu_op[1], 0); expect_bit("ALUOp0", ctrl.alu_op[0], 0);
        end
        6'b101011: begin
          expect_bit("ALUSrc", ctrl.alu_src, 1); expect_bit("RegWrite", ctrl.reg_write, 0);
          expect_bit("MemRead", ctrl.mem_read, 0); expect_bit("MemWrite", ctrl.mem_write, 1);
          expect_bit("Branch", ctrl.branch, 0);
          expect_bit("ALUOp1", ctrl.alu_op[1], 0); expect_bit("ALUOp0", ctrl.alu_op[0], 0);
        end
        6'b000100: begin
          expect_bit("ALUSrc", ctrl.alu_src, 0); expect_bit("RegWrite", ctrl.reg_write, 0);
          expect_bit("MemRead", ctrl.mem_read, 0); expect_bit("MemWrite", ctrl.mem_write, 0);
          expect_bit("Branch", ctrl.branch, 1);
          expect_bit("ALUOp1", ctrl.alu_op[1], 0); expect_bit("ALUOp0", ctrl.alu_op[0], 1);
        end
        default: begin
          expect_bit("RegWrite", ctrl.reg_write, 0); expect_bit("MemWrite", ctrl.mem_write, 0);
          expect_bit("MemRead", ctrl.mem_read, 0); expect_bit("Branch", ctrl.branch, 0);
        end
      endcase
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
