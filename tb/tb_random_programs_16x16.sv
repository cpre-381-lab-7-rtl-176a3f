// tb_random_programs_16x16: runs the datapath in its 16-bit, 16-register organisation on
// random programs (see random_program_check) with several seeds, each
// checked cycle by cycle against an instruction-set model.
module tb_random_programs_16x16;
  int checks [3], failures [3];
  bit done [3];

  random_program_check #(.DATA_W(16), .REG_AW(4), .SEED(23),     .CYCLES(3000)) u0 (
    .checks(checks[0]), .failures(failures[0]), .done(done[0]));
  random_program_check #(.DATA_W(16), .REG_AW(4), .SEED(23 + 1), .CYCLES(3000)) u1 (
    .checks(checks[1]), .failures(failures[1]), .done(done[1]));
  random_program_check #(.DATA_W(16), .REG_AW(4), .SEED(23 + 2), .CYCLES(3000)) u2 (
    .checks(checks[2]), .failures(failures[2]), .done(done[2]));

  initial begin
    #200000;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks.sum(), failures.sum() + 1);
    $finish;
  end

  initial begin
    wait (done[0] && done[1] && done[2]);
    $display("TB_RESULT checks=%0d failures=%0d", checks.sum(), failures.sum());
    $finish;
  end
endmodule
