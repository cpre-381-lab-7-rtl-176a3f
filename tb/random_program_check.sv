// random_program_check: random-program test harness for the single-cycle
// datapath, shared by the 32 x 32 and 16 x 16 register-file configurations.
//
// Fills the whole instruction memory with random instructions (add, sub,
// and, or, slt, an unlisted funct, lw, sw, beq with forward and backward
// offsets, and unlisted opcodes) and the data memory with random words,
// by writing the memory arrays before reset, and loads a fresh random
// program every 64 cycles so that no loop runs for long. It runs CYCLES
// clock cycles and, in the middle of every cycle, compares the datapath's PC,
// instruction, register write, memory write and branch decision with an
// instruction-set model kept here, which decodes the instruction itself.
// At the end it compares all registers and the data memory. Registers are
// drawn mostly from a small set so that beq finds equal operands often.
//
// Parameters: DATA_W and REG_AW as on the datapath, SEED for $urandom,
// CYCLES to run. Outputs checks/failures and raises done when finished.
module random_program_check #(
  parameter int unsigned DATA_W = 32,
  parameter int unsigned REG_AW = 5,
  parameter int unsigned SEED   = 1,
  parameter int unsigned CYCLES = 3000
) (
  output int  checks,
  output int  failures,
  output bit  done
);
  localparam int NREG = 2 ** REG_AW;
  typedef logic [DATA_W-1:0] word_t;

  logic              clk = 0, rst;
  logic [7:0]        pc;
  logic [31:0]       instr;
  word_t             alu_result, write_data, mem_wdata;
  logic              reg_write, mem_write, branch_taken;
  logic [REG_AW-1:0] write_reg;
  logic [7:0]        mem_addr;

  single_cycle_datapath #(
    .DATA_W(DATA_W), .REG_AW(REG_AW), .IMEM_INIT(""), .DMEM_INIT("")
  ) dut (
    .clk, .rst, .pc, .instr, .alu_result, .reg_write, .write_reg,
    .write_data, .mem_write, .mem_addr, .mem_wdata, .branch_taken
  );

  always #5 clk = ~clk;

  logic [31:0] m_imem [256];
  word_t       m_dmem [256];
  word_t       m_regs [NREG];
  logic [7:0]  m_pc;
  int n_r, n_lw, n_sw, n_bt, n_bnt, n_back, n_nop, n_slt_neg;

  function automatic void check(string what, logic [31:0] got, logic [31:0] exp);
    checks++;
    if (got !== exp) begin
      failures++;
      if (failures < 20) $display("FAIL pc=%0d (%h) %s: got %h expected %h",
                                  m_pc, m_imem[m_pc], what, got, exp);
    end
  endfunction

  function automatic logic [4:0] pick_reg();
    return ($urandom % 4 == 0) ? 5'($urandom) : 5'($urandom % 4);
  endfunction

  // An opcode the control table does not list.
  function automatic logic [5:0] unlisted_opcode();
    logic [5:0] o;
    do o = 6'($urandom); while (o == 6'h00 || o == 6'h23 || o == 6'h2b || o == 6'h04);
    return o;
  endfunction

  function automatic logic [31:0] gen_instr();
    int kind = $urandom % 20;
    logic [5:0] fns[6] = '{6'h20, 6'h22, 6'h24, 6'h25, 6'h2a, 6'h27};
    logic [15:0] imm = 16'($signed(8'($urandom)));
    if ($urandom % 8 == 0) imm[15:8] = 8'($urandom);   // ignored bits
    if (kind < 9)
      return {6'h00, pick_reg(), pick_reg(), pick_reg(), 5'($urandom),
              (kind == 8) ? 6'($urandom) : fns[kind % 6]};
    if (kind < 12) return {6'h23, pick_reg(), pick_reg(), imm};
    if (kind < 15) return {6'h2b, pick_reg(), pick_reg(), imm};
    if (kind < 19)   // mostly forward offsets, now and then a backward one
      return {6'h04, pick_reg(), pick_reg(),
              ($urandom % 6 == 0) ? 16'(-1 - int'($urandom % 6)) : 16'($urandom % 8)};
    return {unlisted_opcode(), 26'($urandom)};
  endfunction

  function automatic void step_and_compare();
    logic [31:0] w = m_imem[m_pc];
    logic [5:0]  opc = w[31:26], fn = w[5:0];
    logic [REG_AW-1:0] rs = w[21 +: REG_AW], rt = w[16 +: REG_AW], rd = w[11 +: REG_AW];
    word_t a = m_regs[rs], b = m_regs[rt];
    word_t imm = word_t'($signed(w[7:0]));
    word_t res = '0, ea = '0;
    logic [7:0] npc = m_pc + 8'd1;
    bit wr = 0, mw = 0, taken = 0;
    logic [REG_AW-1:0] dst = '0;

    check("pc", 32'(pc), 32'(m_pc));
    check("instr", instr, w);
    case (opc)
      6'h00: begin
        wr = 1; dst = rd; n_r++;
        case (fn[3:0])
          4'h2: res = a - b;
          4'h4: res = a & b;
          4'h5: res = a | b;
          4'ha: begin
            res = ($signed(a) < $signed(b)) ? word_t'(1) : '0;
            if (a[DATA_W-1] != b[DATA_W-1]) n_slt_neg++;
          end
          default: res = a + b;
        endcase
      end
      6'h23: begin ea = a + imm; wr = 1; dst = rt; res = m_dmem[ea[7:0]]; n_lw++; end
      6'h2b: begin ea = a + imm; mw = 1; n_sw++; end
      6'h04: begin
        taken = (a == b);
        if (taken) begin
          n_bt++; npc = m_pc + 8'd1 + imm[7:0];
          if (imm[DATA_W-1]) n_back++;
        end else n_bnt++;
      end
      default: n_nop++;
    endcase

    check("reg_write", 32'(reg_write), 32'(wr));
    if (wr) begin
      check("write_reg", 32'(write_reg), 32'(dst));
      check("write_data", 32'(write_data), 32'(res));
    end
    check("mem_write", 32'(mem_write), 32'(mw));
    if (mw) begin
      check("mem_addr", 32'(mem_addr), 32'(ea[7:0]));
      check("mem_wdata", 32'(mem_wdata), 32'(b));
    end
    check("branch_taken", 32'(branch_taken), 32'(taken));

    if (wr && dst != 0) m_regs[dst] = res;
    if (mw) m_dmem[ea[7:0]] = b;
    m_pc = npc;
  endfunction

  function automatic void need(string what, int n);
    checks++;
    if (n == 0) begin
      failures++;
      $display("FAIL mechanism never exercised: %s", what);
    end
  endfunction

  initial begin
    checks = 0; failures = 0; done = 0;
    {n_r, n_lw, n_sw, n_bt, n_bnt, n_back, n_nop, n_slt_neg} = '0;
    void'($urandom(SEED));
    rst = 1;
    #1;   // after the memories' own initialisation
    for (int i = 0; i < 256; i++) begin
      m_imem[i] = gen_instr();
      m_dmem[i] = word_t'({$urandom, $urandom});
      dut.u_imem.mem[i] = m_imem[i];
      dut.u_dmem.mem[i] = m_dmem[i];
    end
    foreach (m_regs[i]) m_regs[i] = '0;
    m_pc = 0;
    repeat (2) @(posedge clk);
    @(negedge clk) rst = 0;
    #1;   // let the outputs settle after reset is released
    for (int c = 0; c < CYCLES; c++) begin
      // A fresh program every 64 cycles, so that no loop it happens to hold
      // runs for long.
      if (c % 64 == 63) begin
        for (int i = 0; i < 256; i++) begin
          m_imem[i] = gen_instr();
          dut.u_imem.mem[i] = m_imem[i];
        end
        #1;
      end
      step_and_compare();
      @(negedge clk);
    end
    for (int r = 1; r < NREG; r++)
      check($sformatf("final r%0d", r), 32'(dut.u_regs.regs[r]), 32'(m_regs[r]));
    for (int k = 0; k < 256; k++)
      check($sformatf("final mem[%0d]", k), 32'(dut.u_dmem.mem[k]), 32'(m_dmem[k]));
    need("R-format", n_r);
    need("lw", n_lw);
    need("sw", n_sw);
    need("beq taken", n_bt);
    need("beq not taken", n_bnt);
    need("backward branch", n_back);
    need("unlisted opcode", n_nop);
    need("slt of mixed signs", n_slt_neg);
    $display("DATA_W=%0d REG_AW=%0d: R %0d, lw %0d, sw %0d, beq taken %0d (backward %0d), not taken %0d, unlisted %0d",
             DATA_W, REG_AW, n_r, n_lw, n_sw, n_bt, n_back, n_bnt, n_nop);
    done = 1;
  end
endmodule
