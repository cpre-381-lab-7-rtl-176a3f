// tb_adder: checks the fixed-function adder at the PC width (8 bits)
// exhaustively against integer addition modulo 256.
module tb_adder;
  localparam int W = 8;
  logic [W-1:0] a, b, sum;
  int checks = 0, failures = 0;

  adder #(.W(W)) dut (.a, .b, .sum);

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 256; i++) begin
      for (int j = 0; j < 256; j++) begin
        a = W'(i); b = W'(j);
        #1;
        checks++;
        if (int'(sum) != (i + j) % 256) begin
          failures++;
          $display("FAIL %0d + %0d = %0d", i, j, sum);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
