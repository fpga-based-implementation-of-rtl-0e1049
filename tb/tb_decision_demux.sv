// tb_decision_demux: checks the 1-to-2 decision demultiplexer on all inputs.
// de1 must follow din when sel is high, de0 when sel is low, and the
// unselected output must be low.
module tb_decision_demux;
  logic din, sel, de0, de1;
  int checks = 0, failures = 0;

  decision_demux dut (.din, .sel, .de0, .de1);

  initial begin
    #1ms;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int r = 0; r < 4; r++)
      for (int i = 0; i < 4; i++) begin
        din = i[0]; sel = i[1];
        #1;
        checks += 2;
        if (de1 != (i == 3)) begin failures++; $display("din %0b sel %0b de1 %0b", din, sel, de1); end
        if (de0 != (i == 1)) begin failures++; $display("din %0b sel %0b de0 %0b", din, sel, de0); end
      end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
