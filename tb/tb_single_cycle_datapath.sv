// tb_single_cycle_datapath: runs the demonstration program on the datapath
// at its default configuration (32 x 32-bit registers, 256-word memories)
// and checks it instruction by instruction against an instruction-set model.
//
// The model reads the same program and data files, interprets each
// instruction itself (its own decode of opcode, funct and immediate) and,
// every cycle, predicts the PC, the register write, the memory write and
// whether a branch is taken; the datapath's observation ports must match.
// One instruction must retire per clock (the PC must move every cycle, to the
// predicted address). The run ends when the program reaches its halt loop
// (a beq to itself); then all registers and the data memory are compared
// with the model, plus a few hand-computed results.
//
// Every mechanism of the datapath must occur at least once: R-format ALU
// ops (add, sub, and, or, slt), lw (MemtoReg = 1), sw, beq taken and not
// taken, a negative load/store offset, a backward branch, and a write aimed
// at register 0.
module tb_single_cycle_datapath;
  logic        clk = 0, rst;
  logic [7:0]  pc;
  logic [31:0] instr, alu_result, write_data, mem_wdata;
  logic        reg_write, mem_write, branch_taken;
  logic [4:0]  write_reg;
  logic [7:0]  mem_addr;

  single_cycle_datapath dut (
    .clk, .rst, .pc, .instr, .alu_result, .reg_write, .write_reg,
    .write_data, .mem_write, .mem_addr, .mem_wdata, .branch_taken
  );

  always #5 clk = ~clk;

  // ------------------------------------------------------------- the model
  logic [31:0] m_imem [256];
  logic [31:0] m_dmem [256];
  logic [31:0] m_regs [32];
  logic [7:0]  m_pc;

  int checks = 0, failures = 0, cycles = 0;
  int n_add, n_sub, n_and, n_or, n_slt, n_lw, n_sw, n_beq_t, n_beq_nt;
  int n_neg_off, n_back_br, n_r0_write;

  function automatic void check(string what, logic [31:0] got, logic [31:0] exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL pc=%0d %s: got %h expected %h", m_pc, what, got, exp);
    end
  endfunction

  // Executes the instruction at m_pc on the model, compares with the
  // datapath's outputs in the current cycle, and returns 1 for the halt loop.
  function automatic bit step_and_compare();
    logic [31:0] w = m_imem[m_pc];
    logic [5:0]  opc = w[31:26], fn = w[5:0];
    logic [4:0]  rs = w[25:21], rt = w[20:16], rd = w[15:11];
    logic [31:0] a = m_regs[rs], b = m_regs[rt];
    logic [31:0] imm = {{24{w[7]}}, w[7:0]};
    logic [31:0] res = 0, ea;
    logic [7:0]  npc = m_pc + 8'd1;
    bit wr = 0, mw = 0, taken = 0, halt = 0;
    logic [4:0]  dst = 0;

    check("pc", 32'(pc), 32'(m_pc));
    check("instr", instr, w);
    case (opc)
      6'h00: begin
        wr = 1; dst = rd;
        case (fn[3:0])
          4'h0: begin res = a + b; n_add++; end
          4'h2: begin res = a - b; n_sub++; end
          4'h4: begin res = a & b; n_and++; end
          4'h5: begin res = a | b; n_or++;  end
          4'ha: begin res = ($signed(a) < $signed(b)) ? 1 : 0; n_slt++; end
          default: res = a + b;
        endcase
        if (rd == 0) n_r0_write++;
      end
      6'h23: begin
        ea = a + imm; wr = 1; dst = rt; res = m_dmem[ea[7:0]]; n_lw++;
        if (w[7]) n_neg_off++;
      end
      6'h2b: begin
        ea = a + imm; mw = 1; n_sw++;
        if (w[7]) n_neg_off++;
      end
      6'h04: begin
        taken = (a == b);
        if (taken) begin
          n_beq_t++; npc = m_pc + 8'd1 + imm[7:0];
          if (w[7]) n_back_br++;
          if (npc == m_pc) halt = 1;
        end else n_beq_nt++;
      end
      default: ;
    endcase

    check("reg_write", 32'(reg_write), 32'(wr));
    if (wr) begin
      check("write_reg", 32'(write_reg), 32'(dst));
      check("write_data", write_data, res);
    end
    check("mem_write", 32'(mem_write), 32'(mw));
    if (mw) begin
      check("mem_addr", 32'(mem_addr), 32'(ea[7:0]));
      check("mem_wdata", mem_wdata, b);
    end
    check("branch_taken", 32'(branch_taken), 32'(taken));

    if (wr && dst != 0) m_regs[dst] = res;
    if (mw) m_dmem[ea[7:0]] = b;
    m_pc = npc;
    return halt;
  endfunction

  task automatic need(string what, int n);
    checks++;
    if (n == 0) begin
      failures++;
      $display("FAIL mechanism never exercised: %s", what);
    end else $display("  %-22s %0d", what, n);
  endtask

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    automatic bit halted = 0;
    foreach (m_imem[i]) m_imem[i] = '0;
    foreach (m_dmem[i]) m_dmem[i] = '0;
    foreach (m_regs[i]) m_regs[i] = '0;
    $readmemh("rtl/demo_prog.hex", m_imem);
    $readmemh("rtl/demo_data.hex", m_dmem);
    {n_add, n_sub, n_and, n_or, n_slt, n_lw, n_sw, n_beq_t, n_beq_nt} = '0;
    {n_neg_off, n_back_br, n_r0_write} = '0;
    m_pc = 0;

    rst = 1;
    repeat (2) @(posedge clk);
    @(negedge clk) rst = 0;
    #1;   // let the outputs settle after reset is released

    // From here on, compare in the middle of every cycle (at the falling
    // edge), once the combinational paths have settled.
    while (!halted && cycles < 1000) begin
      halted = step_and_compare();
      cycles++;
      @(negedge clk);
    end
    // Stay in the halt loop for a few cycles: nothing may change.
    repeat (4) begin
      void'(step_and_compare());
      @(negedge clk);
    end

    for (int r = 0; r < 32; r++)
      check($sformatf("final r%0d", r), dut.u_regs.regs[r] & {32{r != 0}}, m_regs[r]);
    for (int k = 0; k < 256; k++)
      check($sformatf("final mem[%0d]", k), dut.u_dmem.mem[k], m_dmem[k]);

    // Hand-computed results of the demonstration program.
    check("r3 = 5 + 7", m_regs[3], 32'd12);
    check("r10 = (-3 < 5)", m_regs[10], 32'd1);
    check("r11 untouched (skipped by beq)", m_regs[11], 32'd0);
    check("mem[11] = r4 via offset -1", m_dmem[11], 32'd2);
    check("r14 = 0 - 5", m_regs[14], 32'hFFFF_FFFB);
    check("instructions to halt", 32'(cycles), 32'd19);

    $display("mechanisms:");
    need("add", n_add);
    need("sub", n_sub);
    need("and", n_and);
    need("or", n_or);
    need("slt", n_slt);
    need("lw", n_lw);
    need("sw", n_sw);
    need("beq taken", n_beq_t);
    need("beq not taken", n_beq_nt);
    need("negative offset", n_neg_off);
    need("backward branch", n_back_br);
    need("write to r0", n_r0_write);
    $display("cycles to halt: %0d", cycles);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
