// tb_mux2: drives random data on both inputs of a 32-bit multiplexer and
// checks that the output follows d0 for sel = 0 and d1 for sel = 1.
module tb_mux2;
  logic        sel;
  logic [31:0] d0, d1, y;
  int checks = 0, failures = 0;

  mux2 #(.W(32)) dut (.sel, .d0, .d1, .y);

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 500; i++) begin
      sel = 1'(i % 2);
      d0 = $urandom; d1 = $urandom;
      #1;
      checks++;
      if (y !== (sel ? d1 : d0)) begin
        failures++;
        $display("FAIL sel=%b d0=%h d1=%h y=%h", sel, d0, d1, y);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
