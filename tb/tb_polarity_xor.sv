// tb_polarity_xor: checks the polarity module on all sign combinations,
// driven from real slope values so the MSB is the sign of the slope.
module tb_polarity_xor;
  logic sl_msb, sr_msb, opposite;
  int checks = 0, failures = 0;

  polarity_xor dut (.sl_msb, .sr_msb, .opposite);

  initial begin
    #1ms;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic signed [7:0] sl, sr;
    for (int i = -128; i < 128; i += 7)
      for (int j = -128; j < 128; j += 5) begin
        sl = 8'(i); sr = 8'(j);
        sl_msb = sl[7]; sr_msb = sr[7];
        #1;
        checks++;
        if (opposite != ((i < 0) != (j < 0))) begin
          failures++;
          if (failures < 10) $display("sl %0d sr %0d: opposite %0b", i, j, opposite);
        end
      end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
