// tb_program_counter: checks that the PC loads pc_next on each rising edge,
// holds between edges, and returns to 0 on synchronous reset.
module tb_program_counter;
  localparam int W = 8;
  logic         clk = 0, rst;
  logic [W-1:0] pc_next, pc, exp;
  int checks = 0, failures = 0;

  program_counter #(.W(W)) dut (.clk, .rst, .pc_next, .pc);

  always #5 clk = ~clk;

  task automatic check(string what);
    checks++;
    if (pc !== exp) begin
      failures++;
      $display("FAIL %s pc=%h expected %h", what, pc, exp);
    end
  endtask

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    rst = 1; pc_next = 8'hA5;
    @(posedge clk); #1;
    exp = 0; check("reset");
    rst = 0;
    for (int i = 0; i < 200; i++) begin
      pc_next = $urandom;
      rst = ($urandom % 16 == 0);
      #2;
      check("hold before edge");
      exp = rst ? '0 : pc_next;
      @(posedge clk); #1;
      check("load");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
