// program_counter: the state register that sequences the datapath.
//
// Holds the word address of the instruction being executed. On every rising
// clock edge it loads pc_next, which the datapath forms from PC+1 or the
// branch target. The instruction memory is word addressed, so the PC counts
// words and is W bits wide for a 2**W-word memory (8 bits for 256 words).
//
// Design choice: a synchronous, active-high reset returns the PC to word 0.
//
// Timing: pc changes only at the rising edge of clk. The width follows the
// specification's 256-word instruction memory.
module program_counter #(
  parameter int unsigned W = 8
) (
  input  logic         clk,
  input  logic         rst,
  input  logic [W-1:0] pc_next,
  output logic [W-1:0] pc
);

  always_ff @(posedge clk) begin
    if (rst) pc <= '0;
    else     pc <= pc_next;
  end

endmodule
