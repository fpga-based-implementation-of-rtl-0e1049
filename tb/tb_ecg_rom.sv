// tb_ecg_rom: checks the sample ROM.
// The expected record comes from tb/ecg_ref.hex, produced by a separate
// model of the synthetic ECG. Three ROMs are read at random and sequential
// addresses: the built-in record with delay 0 and with delay 10, and the
// file-loaded record with delay 20. Each read must return the right word one
// clock after the address is presented; reset must clear the output.
module tb_ecg_rom;
  logic clk = 1'b0, rst = 1'b1;
  logic [9:0] addr = '0;
  logic [7:0] d0, d10, d20;
  logic [7:0] ref_mem [1024];
  int checks = 0, failures = 0;

  ecg_rom                                      u_d0  (.clk, .rst, .addr, .dout(d0));
  ecg_rom #(.DELAY(10))                        u_d10 (.clk, .rst, .addr, .dout(d10));
  ecg_rom #(.DELAY(20), .INIT_FILE("tb/ecg_ref.hex")) u_d20 (.clk, .rst, .addr, .dout(d20));

  always #5 clk = ~clk;

  function automatic logic [7:0] delayed(int a, int d);
    return (a >= d) ? ref_mem[a - d] : ref_mem[0];
  endfunction

  task automatic check(string what, logic [7:0] got, logic [7:0] exp);
    checks++;
    if (got !== exp) begin
      failures++;
      if (failures < 10) $display("%s: got %0d expected %0d", what, got, exp);
    end
  endtask

  initial begin
    #200000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int a;
    $readmemh("tb/ecg_ref.hex", ref_mem);
    repeat (2) @(posedge clk);
    @(negedge clk);
    check("reset d0", d0, 8'd0);
    check("reset d10", d10, 8'd0);
    rst = 1'b0;
    // Sequential sweep followed by random addresses.
    for (int i = 0; i < 1024 + 2000; i++) begin
      a = (i < 1024) ? i : int'($urandom_range(1023, 0));
      addr = 10'(a);
      @(posedge clk);
      // Output must not change before the clock edge: check one cycle later.
      @(negedge clk);
      check("d0", d0, delayed(a, 0));
      check("d10", d10, delayed(a, 10));
      check("d20", d20, delayed(a, 20));
    end
    // Latency: a new address shows only after the next edge.
    addr = 10'd500;
    @(posedge clk);
    @(negedge clk);
    addr = 10'd700;
    #1;
    check("latency hold", d0, delayed(500, 0));
    @(negedge clk);
    check("latency update", d0, delayed(700, 0));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
