// data_mem: word-addressed data memory of the datapath.
//
// 2**AW words of W bits: 256 words as wide as the datapath. The address is
// the low AW bits of the ALU result (a word address). Optional initial
// contents come from INIT_FILE via $readmemh (one hex word per line, word 0
// first); words the file does not give start at 0.
//
// Timing: when mem_write is 1, wdata is stored at the rising clock edge.
// Reads are combinational: rdata = mem[addr] while mem_read is 1 and 0
// otherwise (a design choice: MemRead gates the read port), so a lw
// completes within its cycle. Size and word addressing follow the
// specification; the read/write timing and the MemRead gating are this
// design's choices.
module data_mem #(
  parameter int unsigned AW        = 8,
  parameter int unsigned W         = 32,
  parameter string       INIT_FILE = ""
) (
  input  logic          clk,
  input  logic [AW-1:0] addr,
  input  logic          mem_read,
  input  logic          mem_write,
  input  logic [W-1:0]  wdata,
  output logic [W-1:0]  rdata
);

  localparam int unsigned DEPTH = 2 ** AW;

  logic [W-1:0] mem [DEPTH];

  initial begin
    for (int i = 0; i < DEPTH; i++) mem[i] = '0;
    if (INIT_FILE != "") $readmemh(INIT_FILE, mem);
  end

  always_ff @(posedge clk) begin
    if (mem_write) mem[addr] <= wdata;
  end

  assign rdata = mem_read ? mem[addr] : '0;

endmodule
