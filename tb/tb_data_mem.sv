// tb_data_mem: checks the 256-word data memory against an array model.
//
// The memory is loaded from the demonstration data file, so the test first
// reads those words (5, 7, -3, 0x80000000, then zeros). It then issues random
// writes and reads: a write lands at the clock edge, a read is combinational
// and shows 0 while mem_read is low.
module tb_data_mem;
  logic        clk = 0;
  logic [7:0]  addr;
  logic        mem_read, mem_write;
  logic [31:0] wdata, rdata, exp;
  logic [31:0] model [256];
  int checks = 0, failures = 0;

  data_mem #(.AW(8), .W(32), .INIT_FILE("rtl/demo_data.hex")) dut (
    .clk, .addr, .mem_read, .mem_write, .wdata, .rdata
  );

  always #5 clk = ~clk;

  task automatic check_read();
    exp = mem_read ? model[addr] : '0;
    checks++;
    if (rdata !== exp) begin
      failures++;
      $display("FAIL addr=%0d read=%b rdata=%h expected %h", addr, mem_read, rdata, exp);
    end
  endtask

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    foreach (model[i]) model[i] = '0;
    model[0] = 32'd5; model[1] = 32'd7; model[2] = 32'hFFFF_FFFD; model[3] = 32'h8000_0000;
    mem_write = 0; mem_read = 1; wdata = 0;
    for (int a = 0; a < 256; a++) begin
      addr = 8'(a); #1; check_read();
    end
    for (int i = 0; i < 3000; i++) begin
      @(negedge clk);
      addr = $urandom;
      mem_write = ($urandom % 2 == 0);
      mem_read  = ($urandom % 4 != 0);
      wdata = $urandom;
      #1;
      check_read();
      @(posedge clk);
      if (mem_write) model[addr] = wdata;
      #1;
      check_read();
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
