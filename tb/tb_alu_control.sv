// tb_alu_control: exhaustive check of the ALU control table.
//
// Applies every ALUOp (4 values) with every funct (64 values) and compares
// the 3-bit operation with the table rows, reading funct[3:0] only for
// R-format. Rows the table leaves open (R-format with an unlisted funct)
// are checked against the documented choice, add.
module tb_alu_control;
  import mips_pkg::*;

  aluop_e     alu_op;
  logic [5:0] funct;
  alu_op_e    op;
  logic [2:0] exp;
  int checks = 0, failures = 0;

  alu_control dut (.alu_op, .funct, .op);

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int a = 0; a < 4; a++) begin
      for (int f = 0; f < 64; f++) begin
        alu_op = aluop_e'(a);
        funct  = 6'(f);
        #1;
        if (a[0])            exp = 3'b110;
        else if (!a[1])      exp = 3'b010;
        else if (f[3:0] == 4'b0000) exp = 3'b010;
        else if (f[3:0] == 4'b0010) exp = 3'b110;
        else if (f[3:0] == 4'b0100) exp = 3'b000;
        else if (f[3:0] == 4'b0101) exp = 3'b001;
        else if (f[3:0] == 4'b1010) exp = 3'b111;
        else                 exp = 3'b010;
        checks++;
        if (op !== exp) begin
          failures++;
          $display("FAIL ALUOp=%b funct=%b got %b expected %b", 2'(a), 6'(f), op, exp);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
