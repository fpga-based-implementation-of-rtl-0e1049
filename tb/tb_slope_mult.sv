// tb_slope_mult: exhaustive check of the signed 8x8 slope multiplier.
module tb_slope_mult;
  logic signed [7:0] sl, sr;
  logic signed [15:0] prod;
  int checks = 0, failures = 0;

  slope_mult dut (.sl, .sr, .prod);

  initial begin
    #10ms;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = -128; i < 128; i++)
      for (int j = -128; j < 128; j++) begin
        sl = 8'(i); sr = 8'(j);
        #1;
        checks++;
        if (int'(prod) != i * j) begin
          failures++;
          if (failures < 10) $display("%0d * %0d: got %0d", i, j, prod);
        end
      end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
