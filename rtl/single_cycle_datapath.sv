// single_cycle_datapath: MIPS-subset processor that completes every
// instruction in one clock cycle.
//
// It executes the R-format instructions add, sub, and, or, slt and the
// I-format instructions lw, sw and beq. In each cycle the PC addresses the
// instruction memory; the opcode drives the main control; the register file
// reads rs and rt; the ALU combines rs with either rt or the sign-extended
// immediate; the data memory is read or written at the ALU result; and, at
// the rising clock edge, the result (ALU or memory) is written to rt or rd
// and the PC moves to PC+1 or to the branch target.
//
// Memories are word addressed: the PC counts 32-bit instruction words, so
// the PC adder adds 1, the branch target is PC+1+offset with the offset in
// words, and there is no shift-left-by-2 unit. The immediate is
// instruction[7:0] only (bits 15:8 of a MIPS immediate are ignored), so
// load/store offsets and branch offsets lie in -128..127.
//
// Multiplexer inputs (0 / 1): write register rt / rd (RegDst); ALU operand
// B register rt / immediate (ALUSrc); write-back ALU result / memory read
// data (MemtoReg); next PC PC+1 / branch target (taken branch). A branch is
// taken when the control's Branch signal and the ALU's zero flag are both 1,
// which is beq's "branch if equal" after the ALU has subtracted rt from rs.
//
// Datapath width and register count are parameters: 32 registers of 32
// bits by default; REG_AW = 4 with DATA_W = 16 gives the 16 x 16
// organisation, which uses the low 4 bits of each register field.
// IMEM_INIT and DMEM_INIT name the $readmemh files that load the two
// memories; the defaults hold a short program that uses every instruction.
//
// Word addressing, the 8-bit immediate, the 256-word memories, the control
// tables and the wiring follow the specification. The default width of 32
// bits, register 0 reading as zero, the reset behaviour and the
// asynchronous memory reads are choices of this design.
//
// Ports: clk, rst (synchronous, active high: PC and registers to 0, and
// no data-memory write while it is held), and
// observation outputs that show, for the instruction executing this cycle,
// its PC and word, the ALU result, the register write (enable, register,
// value), the memory write (enable, address, value) and whether a branch is
// taken.
module single_cycle_datapath
  import mips_pkg::*;
#(
  parameter int unsigned DATA_W    = 32,
  parameter int unsigned REG_AW    = 5,
  parameter int unsigned PC_W      = 8,
  parameter int unsigned DMEM_AW   = 8,
  parameter int unsigned IMM_W     = 8,
  parameter string       IMEM_INIT = "rtl/demo_prog.hex",
  parameter string       DMEM_INIT = "rtl/demo_data.hex"
) (
  input  logic              clk,
  input  logic              rst,
  output logic [PC_W-1:0]   pc,
  output logic [31:0]       instr,
  output logic [DATA_W-1:0] alu_result,
  output logic              reg_write,
  output logic [REG_AW-1:0] write_reg,
  output logic [DATA_W-1:0] write_data,
  output logic              mem_write,
  output logic [DMEM_AW-1:0] mem_addr,
  output logic [DATA_W-1:0] mem_wdata,
  output logic              branch_taken
);

  // ---------------------------------------------------------------- fetch
  logic [PC_W-1:0] pc_plus1, pc_branch, pc_next;

  program_counter #(.W(PC_W)) u_pc (
    .clk, .rst, .pc_next, .pc
  );

  adder #(.W(PC_W)) u_pc_inc (
    .a(pc), .b(PC_W'(1)), .sum(pc_plus1)
  );

  instr_mem #(.AW(PC_W), .W(32), .INIT_FILE(IMEM_INIT)) u_imem (
    .addr(pc), .instr
  );

  // --------------------------------------------------------------- decode
  ctrl_t       ctrl;
  alu_op_e     alu_op;
  logic [REG_AW-1:0] rs, rt, rd;
  logic [DATA_W-1:0] rs_val, rt_val, imm_ext;

  assign rs = instr[21 +: REG_AW];
  assign rt = instr[16 +: REG_AW];
  assign rd = instr[11 +: REG_AW];

  control_unit u_ctrl (
    .opcode(instr[31:26]), .ctrl
  );

  alu_control u_alu_ctrl (
    .alu_op(ctrl.alu_op), .funct(instr[5:0]), .op(alu_op)
  );

  mux2 #(.W(REG_AW)) u_regdst_mux (
    .sel(ctrl.reg_dst), .d0(rt), .d1(rd), .y(write_reg)
  );

  reg_file #(.AW(REG_AW), .W(DATA_W)) u_regs (
    .clk, .rst,
    .ra1(rs), .ra2(rt), .rd1(rs_val), .rd2(rt_val),
    .we(ctrl.reg_write), .wa(write_reg), .wd(write_data)
  );

  sign_extend #(.IN_W(IMM_W), .OUT_W(DATA_W)) u_sext (
    .imm(instr[IMM_W-1:0]), .ext(imm_ext)
  );

  // -------------------------------------------------------------- execute
  logic [DATA_W-1:0] alu_b;
  logic              alu_zero;

  mux2 #(.W(DATA_W)) u_alusrc_mux (
    .sel(ctrl.alu_src), .d0(rt_val), .d1(imm_ext), .y(alu_b)
  );

  alu #(.W(DATA_W)) u_alu (
    .op(alu_op), .a(rs_val), .b(alu_b), .y(alu_result), .zero(alu_zero)
  );

  adder #(.W(PC_W)) u_br_add (
    .a(pc_plus1), .b(imm_ext[PC_W-1:0]), .sum(pc_branch)
  );

  assign branch_taken = ctrl.branch & alu_zero;

  mux2 #(.W(PC_W)) u_pcsrc_mux (
    .sel(branch_taken), .d0(pc_plus1), .d1(pc_branch), .y(pc_next)
  );

  // --------------------------------------------------------------- memory
  logic [DATA_W-1:0] mem_rdata;

  assign mem_addr  = alu_result[DMEM_AW-1:0];
  assign mem_wdata = rt_val;
  // No store while reset is held: the instruction seen during reset must
  // not change the memory contents.
  assign mem_write = ctrl.mem_write & ~rst;

  data_mem #(.AW(DMEM_AW), .W(DATA_W), .INIT_FILE(DMEM_INIT)) u_dmem (
    .clk, .addr(mem_addr), .mem_read(ctrl.mem_read),
    .mem_write(mem_write), .wdata(rt_val), .rdata(mem_rdata)
  );

  // ------------------------------------------------------------ writeback
  mux2 #(.W(DATA_W)) u_memtoreg_mux (
    .sel(ctrl.mem_to_reg), .d0(alu_result), .d1(mem_rdata), .y(write_data)
  );

  assign reg_write = ctrl.reg_write;

  // Control rules every decoded instruction obeys: memory is never read and
  // written in the same cycle, and a store or branch never writes a register.
  a_mem_rw_exclusive: assert property (@(posedge clk) disable iff (rst)
    !(ctrl.mem_read && ctrl.mem_write));
  a_no_regwrite_on_store_or_branch: assert property (@(posedge clk) disable iff (rst)
    (ctrl.mem_write || ctrl.branch) |-> !ctrl.reg_write);

  // The PC and both memories are word addressed at these widths.
  initial begin
    assert (DATA_W >= PC_W && DATA_W >= DMEM_AW && DATA_W > IMM_W)
      else $error("DATA_W too small for PC_W, DMEM_AW or IMM_W");
  end

endmodule
