// tb_threshold_cmp: checks the threshold comparator, above = |prod| > ref.
// Uses the boundary values around the threshold for both signs, and random
// products and thresholds across the whole range a signed 8x8 product takes.
module tb_threshold_cmp;
  logic signed [15:0] prod;
  logic [15:0] ref_in;
  logic above;
  int checks = 0, failures = 0;

  threshold_cmp dut (.prod, .ref_in, .above);

  initial begin
    #10ms;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic apply(int p, int r);
    int mag;
    prod = 16'(p); ref_in = 16'(r);
    #1;
    mag = (p < 0) ? -p : p;
    checks++;
    if (above != (mag > r)) begin
      failures++;
      if (failures < 10) $display("prod %0d ref %0d: above %0b", p, r, above);
    end
  endtask

  initial begin
    for (int d = -2; d <= 2; d++) begin
      apply(1000 + d, 1000);
      apply(-1000 - d, 1000);
    end
    apply(0, 0);
    apply(16384, 16383);
    apply(-16256, 16255);
    apply(-16256, 16256);
    for (int i = 0; i < 20000; i++)
      apply(int'($urandom_range(32640, 0)) - 16256, int'($urandom_range(16384, 0)));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
