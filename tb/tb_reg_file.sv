// tb_reg_file: random reads and writes on a 32 x 32 register file checked
// against an array model.
//
// Checks: reset clears every register; both read ports show the addressed
// register combinationally; a write lands at the clock edge (the old value is
// read before it); writes with we = 0 and writes to register 0 change nothing.
module tb_reg_file;
  localparam int AW = 5, W = 32;
  logic          clk = 0, rst;
  logic [AW-1:0] ra1, ra2, wa;
  logic [W-1:0]  rd1, rd2, wd;
  logic          we;
  logic [W-1:0]  model [32];
  int checks = 0, failures = 0, zero_writes = 0;

  reg_file #(.AW(AW), .W(W)) dut (.clk, .rst, .ra1, .ra2, .rd1, .rd2, .we, .wa, .wd);

  always #5 clk = ~clk;

  task automatic check_reads();
    checks += 2;
    if (rd1 !== model[ra1]) begin
      failures++; $display("FAIL rd1 r%0d=%h expected %h", ra1, rd1, model[ra1]);
    end
    if (rd2 !== model[ra2]) begin
      failures++; $display("FAIL rd2 r%0d=%h expected %h", ra2, rd2, model[ra2]);
    end
  endtask

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    rst = 1; we = 0; wa = 0; wd = 0; ra1 = 0; ra2 = 0;
    @(posedge clk); #1;
    rst = 0;
    foreach (model[i]) model[i] = '0;
    for (int r = 0; r < 32; r++) begin
      ra1 = AW'(r); ra2 = AW'(31 - r); #1; check_reads();
    end
    for (int i = 0; i < 3000; i++) begin
      we  = ($urandom % 4 != 0);
      wa  = (i % 50 == 0) ? '0 : AW'($urandom);
      wd  = $urandom;
      ra1 = (i % 3 == 0) ? wa : AW'($urandom);
      ra2 = AW'($urandom);
      #1;
      check_reads();                       // old value before the edge
      @(posedge clk);
      if (we && wa != 0) model[wa] = wd;
      if (we && wa == 0) zero_writes++;
      #1;
      check_reads();                       // new value after the edge
    end
    checks++;
    if (zero_writes == 0) begin
      failures++; $display("FAIL no write to register 0 was tried");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
