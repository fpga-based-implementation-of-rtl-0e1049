// tb_addr_counter: checks the ROM address counter.
// Holds reset, then runs 2.5 wraps of the default 10-bit counter and checks
// the value every cycle against a separately kept count (one step per clock,
// wrap from 1023 to 0), plus a reset in the middle of a run.
module tb_addr_counter;
  logic clk = 1'b0, rst = 1'b1;
  logic [9:0] count;
  int checks = 0, failures = 0, wraps = 0;
  int expected;

  addr_counter dut (.clk, .rst, .count);

  always #5 clk = ~clk;

  initial begin
    #200000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3) @(posedge clk);
    @(negedge clk);
    checks++; if (count != 0) begin failures++; $display("reset value %0d", count); end
    rst = 1'b0;
    expected = 0;
    for (int i = 0; i < 2600; i++) begin
      @(negedge clk);
      expected = (expected + 1) % 1024;
      if (expected == 0) wraps++;
      checks++;
      if (count != 10'(expected)) begin
        failures++;
        if (failures < 10) $display("cycle %0d: count %0d expected %0d", i, count, expected);
      end
    end
    rst = 1'b1;
    @(negedge clk);
    checks++; if (count != 0) begin failures++; $display("mid-run reset failed"); end
    rst = 1'b0;
    @(negedge clk);
    checks++; if (count != 1) begin failures++; $display("restart failed"); end
    checks++; if (wraps != 2) begin failures++; $display("wraps %0d", wraps); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
