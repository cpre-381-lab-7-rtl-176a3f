// tb_alu: checks the five ALU operations and the zero flag.
//
// Drives directed corner cases (equal operands, signed/unsigned
// disagreement for set-on-less-than, wrap-around) and random operands for
// each operation, and compares the result and zero flag with values
// computed here.
module tb_alu;
  import mips_pkg::*;

  localparam int W = 32;
  alu_op_e      op;
  logic [W-1:0] a, b, y, exp;
  logic         zero;
  int checks = 0, failures = 0;

  alu #(.W(W)) dut (.op, .a, .b, .y, .zero);

  function automatic logic [W-1:0] model(alu_op_e o, logic [W-1:0] x, logic [W-1:0] z);
    case (o)
      ALU_AND: return x & z;
      ALU_OR:  return x | z;
      ALU_ADD: return x + z;
      ALU_SUB: return x + ~z + 1;
      ALU_SLT: begin
        if (x[W-1] != z[W-1]) return {31'b0, x[W-1]};
        return {31'b0, x < z};
      end
      default: return '0;
    endcase
  endfunction

  task automatic apply(alu_op_e o, logic [W-1:0] x, logic [W-1:0] z);
    op = o; a = x; b = z;
    #1;
    exp = model(o, x, z);
    checks += 2;
    if (y !== exp) begin
      failures++;
      $display("FAIL op=%b a=%h b=%h y=%h expected %h", o, x, z, y, exp);
    end
    if (zero !== (exp == 0)) begin
      failures++;
      $display("FAIL zero op=%b a=%h b=%h zero=%b", o, x, z, zero);
    end
  endtask

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    alu_op_e ops[5] = '{ALU_AND, ALU_OR, ALU_ADD, ALU_SUB, ALU_SLT};
    apply(ALU_SUB, 32'd7, 32'd7);
    apply(ALU_SUB, 32'd7, 32'd5);
    apply(ALU_SLT, 32'hFFFF_FFFD, 32'd5);   // -3 < 5
    apply(ALU_SLT, 32'd5, 32'hFFFF_FFFD);
    apply(ALU_SLT, 32'h8000_0000, 32'h7FFF_FFFF);
    apply(ALU_ADD, 32'hFFFF_FFFF, 32'd1);
    apply(ALU_AND, 32'hF0F0_F0F0, 32'h0F0F_0F0F);
    apply(ALU_OR,  32'hF0F0_F0F0, 32'h0F0F_0F0F);
    for (int i = 0; i < 2000; i++) begin
      apply(ops[i % 5], $urandom, (i % 7 == 0) ? a : $urandom);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
