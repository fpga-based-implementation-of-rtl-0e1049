// tb_slope_sub: exhaustive check of the 8-bit slope subtractor.
// For every pair (a, b) the difference must be (a - b) mod 256 and the carry
// must be 1 exactly when a >= b.
module tb_slope_sub;
  logic [7:0] a, b, diff;
  logic carry_out;
  int checks = 0, failures = 0;

  slope_sub dut (.a, .b, .diff, .carry_out);

  initial begin
    #10ms;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 256; i++)
      for (int j = 0; j < 256; j++) begin
        a = 8'(i); b = 8'(j);
        #1;
        checks++;
        if (int'(diff) != ((i - j + 256) % 256) || carry_out != (i >= j)) begin
          failures++;
          if (failures < 10) $display("%0d - %0d: diff %0d carry %0b", i, j, diff, carry_out);
        end
      end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
