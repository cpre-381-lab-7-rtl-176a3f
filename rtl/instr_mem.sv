// instr_mem: word-addressed instruction memory (read-only within the datapath).
//
// 2**AW words of W bits: 256 x 32 by default. The contents come only from an
// initialization file, INIT_FILE, read with $readmemh (one hex word per line,
// word 0 first); words the file does not give are 0, which decodes as an
// R-format instruction writing register 0, i.e. no effect. With INIT_FILE
// empty the memory is all zero. The datapath never writes it, so it is
// built as a ROM. A synthesis front end that does not evaluate $readmemh
// sees an all-zero ROM and hence a constant instr output; the contents then
// have to be supplied the tool's own way (FPGA memory initialisation).
//
// Timing: combinational read, instr = mem[addr] in the same cycle, as the
// single-cycle datapath needs the instruction within the cycle that fetches
// it. (An FPGA block RAM with a registered address would need the PC to feed
// it ahead of the clock edge; that variant is not modelled here.)
module instr_mem #(
  parameter int unsigned AW        = 8,
  parameter int unsigned W         = 32,
  parameter string       INIT_FILE = ""
) (
  input  logic [AW-1:0] addr,
  output logic [W-1:0]  instr
);

  localparam int unsigned DEPTH = 2 ** AW;

  logic [W-1:0] mem [DEPTH];

  initial begin
    for (int i = 0; i < DEPTH; i++) mem[i] = '0;
    if (INIT_FILE != "") $readmemh(INIT_FILE, mem);
  end

  assign instr = mem[addr];

endmodule
