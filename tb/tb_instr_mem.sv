// tb_instr_mem: loads the demonstration program into a 256 x 32 instruction
// memory and reads every word back.
//
// The expected words are assembled here from the instruction fields (opcode,
// registers, funct, immediate), independently of the hex file; words past the
// end of the program must read 0.
module tb_instr_mem;
  logic [7:0]  addr;
  logic [31:0] instr;
  logic [31:0] exp [256];
  int checks = 0, failures = 0;

  instr_mem #(.AW(8), .W(32), .INIT_FILE("rtl/demo_prog.hex")) dut (.addr, .instr);

  function automatic logic [31:0] r(int fn, int rd, int rs, int rt);
    return {6'd0, 5'(rs), 5'(rt), 5'(rd), 5'd0, 6'(fn)};
  endfunction
  function automatic logic [31:0] i_(int op, int rt, int rs, int imm);
    return {6'(op), 5'(rs), 5'(rt), 16'(imm)};
  endfunction

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    foreach (exp[k]) exp[k] = '0;
    exp[0]  = i_('h23, 1, 0, 0);   exp[1]  = i_('h23, 2, 0, 1);
    exp[2]  = r('h20, 3, 1, 2);    exp[3]  = r('h22, 4, 2, 1);
    exp[4]  = r('h24, 5, 1, 2);    exp[5]  = r('h25, 6, 1, 2);
    exp[6]  = r('h2a, 7, 1, 2);    exp[7]  = r('h2a, 8, 2, 1);
    exp[8]  = i_('h2b, 3, 0, 4);   exp[9]  = i_('h04, 2, 1, 2);
    exp[10] = i_('h23, 9, 0, 2);   exp[11] = r('h2a, 10, 9, 1);
    exp[12] = i_('h04, 1, 1, 1);   exp[13] = r('h20, 11, 1, 1);
    exp[14] = i_('h2b, 4, 3, -1);  exp[15] = i_('h23, 12, 0, 4);
    exp[16] = r('h20, 0, 1, 2);    exp[17] = i_('h23, 13, 3, -9);
    exp[18] = r('h22, 14, 0, 1);   exp[19] = i_('h04, 0, 0, -1);
    for (int a = 0; a < 256; a++) begin
      addr = 8'(a);
      #1;
      checks++;
      if (instr !== exp[a]) begin
        failures++;
        $display("FAIL word %0d = %h expected %h", a, instr, exp[a]);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
