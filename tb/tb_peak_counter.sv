// tb_peak_counter: checks the R-peak counter.
// Random pulse trains (runs of 1 of random length) drive a 16-bit counter and
// a 3-bit one; each must count rising edges only, one cycle after the edge,
// and the 3-bit one must saturate at 7.
module tb_peak_counter;
  logic clk = 1'b0, rst = 1'b1, pulse = 1'b0;
  logic [15:0] count;
  logic [2:0]  count3;
  int checks = 0, failures = 0, edges = 0;
  logic prev = 1'b0;

  peak_counter              dut   (.clk, .rst, .pulse, .count);
  peak_counter #(.WIDTH(3)) dut_s (.clk, .rst, .pulse, .count(count3));

  always #5 clk = ~clk;

  initial begin
    #500000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2) @(posedge clk);
    @(negedge clk);
    rst = 1'b0;
    for (int i = 0; i < 5000; i++) begin
      pulse = ($urandom_range(3, 0) == 0) ? ~pulse : pulse;
      if (pulse && !prev) edges++;
      prev = pulse;
      @(negedge clk);
      checks += 2;
      if (int'(count) != edges) begin
        failures++;
        if (failures < 10) $display("cycle %0d: count %0d expected %0d", i, count, edges);
      end
      if (int'(count3) != ((edges > 7) ? 7 : edges)) begin
        failures++;
        if (failures < 10) $display("cycle %0d: count3 %0d expected %0d", i, count3, edges);
      end
    end
    checks++;
    if (edges < 100) begin failures++; $display("too few edges %0d", edges); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
