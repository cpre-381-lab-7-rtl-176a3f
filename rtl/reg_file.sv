// reg_file: register file of the datapath, two read ports and one write port.
//
// 2**AW registers of W bits (32 x 32 by default, as in MIPS; 16 x 16 is the
// other organisation the design allows, in which case the datapath drops the
// most significant bit of each 5-bit register field). Reads are
// combinational: rd1/rd2 show the registers addressed by ra1/ra2 in the same
// cycle. A write of wd to register wa happens at the rising clock edge when
// we is 1, so an instruction reads the old value and its result is visible
// to the next instruction.
//
// The two organisations follow the specification, which reuses an earlier
// register file without giving its insides.
// Design choices: register 0 always reads 0 and ignores writes (the MIPS
// convention), and a synchronous active-high reset clears every register.
module reg_file #(
  parameter int unsigned AW = 5,
  parameter int unsigned W  = 32
) (
  input  logic          clk,
  input  logic          rst,
  input  logic [AW-1:0] ra1,
  input  logic [AW-1:0] ra2,
  output logic [W-1:0]  rd1,
  output logic [W-1:0]  rd2,
  input  logic          we,
  input  logic [AW-1:0] wa,
  input  logic [W-1:0]  wd
);

  localparam int unsigned N = 2 ** AW;

  logic [W-1:0] regs [N];

  always_ff @(posedge clk) begin
    if (rst) begin
      for (int i = 0; i < N; i++) regs[i] <= '0;
    end else if (we && wa != '0) begin
      regs[wa] <= wd;
    end
  end

  assign rd1 = (ra1 == '0) ? '0 : regs[ra1];
  assign rd2 = (ra2 == '0) ? '0 : regs[ra2];

endmodule
