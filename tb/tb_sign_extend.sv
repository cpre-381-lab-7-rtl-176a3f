// tb_sign_extend: applies all 256 values of the 8-bit immediate and checks
// that the 32-bit result equals the same signed integer.
module tb_sign_extend;
  logic [7:0]  imm;
  logic [31:0] ext;
  int checks = 0, failures = 0;

  sign_extend #(.IN_W(8), .OUT_W(32)) dut (.imm, .ext);

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = -128; i < 128; i++) begin
      imm = 8'(i);
      #1;
      checks++;
      if ($signed(ext) != i) begin
        failures++;
        $display("FAIL imm=%h ext=%h expected %0d", imm, ext, i);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
