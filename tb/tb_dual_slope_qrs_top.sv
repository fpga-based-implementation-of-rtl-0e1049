// tb_dual_slope_qrs_top: end-to-end test of the dual-slope QRS detector at
// its default parameters (1Kx8 ROMs, D1 = 10, D2 = 20, threshold 1000).
//
// The expected record is read from tb/ecg_ref.hex, produced by a separate
// model of the built-in synthetic ECG. For every clock the testbench works
// out which address the detector is on, forms the three samples, the two
// slopes, their product and the two criteria in plain integer arithmetic,
// and compares de0, de1 and the peak count. It runs the record two and a
// half times, so the address counters wrap. It also checks that every
// detection lies on a QRS complex of the record (beat positions 74..126 of
// 288, from the start of Q to the end of S: the steep S minimum after the R
// peak meets both criteria too) and that every beat is detected. It counts
// how often each mechanism occurred: detection pulses on de1, steep
// same-sign slopes on de0, extremes rejected by the threshold, steep samples
// rejected by the polarity check, and counter wraps; one that never occurs
// counts as a failure. Repeat detections within one beat are reported: the
// detector has no local-extreme search, so they are expected.
module tb_dual_slope_qrs_top;
  localparam int D1 = 10, D2 = 20, THR = 1000, N = 1024, PER = 288;

  logic clk = 1'b0, rst = 1'b1;
  logic de0, de1;
  logic [15:0] peak_count;
  logic [7:0] x [N];
  int checks = 0, failures = 0;
  int n_de1 = 0, n_de0 = 0, n_thr_reject = 0, n_pol_reject = 0, n_wraps = 0;
  int edges = 0, beats_seen = 0, beats_found = 0, n_multi = 0, last_key = -1;

  dual_slope_qrs_top dut (.clk, .rst, .de0, .de1, .peak_count);

  always #10 clk = ~clk;  // 50 MHz

  initial begin
    #2ms;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic int sample(int a, int d);
    return (a >= d) ? int'(x[a - d]) : int'(x[0]);
  endfunction

  task automatic check(string what, int got, int exp, int cyc);
    checks++;
    if (got != exp) begin
      failures++;
      if (failures < 15) $display("cycle %0d %s: got %0d expected %0d", cyc, what, got, exp);
    end
  endtask

  initial begin
    int a, r1, r2, r3, sl, sr, p, mag, centre, pos, key;
    bit thr, opp, e1, e0, prev_e1;
    $readmemh("tb/ecg_ref.hex", x);
    repeat (3) @(posedge clk);
    @(negedge clk);
    // In the first cycle after reset the ROM outputs are cleared.
    check("de0 after reset", int'(de0), 0, 0);
    check("de1 after reset", int'(de1), 0, 0);
    rst = 1'b0;
    prev_e1 = 1'b0;
    for (int cyc = 1; cyc <= 2 * N + N / 2; cyc++) begin
      @(negedge clk);
      a = (cyc - 1) % N;           // address whose ROM words are on the outputs
      if (cyc > 1 && a == 0) n_wraps++;
      r1 = sample(a, 0);  r2 = sample(a, D1);  r3 = sample(a, D2);
      sl = r2 - r1;       sr = r3 - r2;
      p = sl * sr;
      mag = (p < 0) ? -p : p;
      thr = mag > THR;
      opp = (sl < 0) != (sr < 0);
      e1 = thr && opp;
      e0 = thr && !opp;
      check("de1", int'(de1), int'(e1), cyc);
      check("de0", int'(de0), int'(e0), cyc);
      if (e1) n_de1++;
      if (e0) n_de0++;
      if (opp && !thr && mag > 0) n_thr_reject++;
      if (thr && !opp) n_pol_reject++;
      if (e1 && !prev_e1) begin
        edges++;
        // A detection must sit on an R wave of the record.
        centre = (a >= D1) ? a - D1 : 0;
        pos = centre % PER;
        checks++;
        key = ((cyc - 1) / N) * 8 + centre / PER;
        if (key != last_key) beats_found++; else n_multi++;
        last_key = key;
        if (pos < 74 || pos > 126) begin
          failures++;
          $display("cycle %0d: detection at beat position %0d, off the QRS complex", cyc, pos);
        end
      end
      prev_e1 = e1;
      // The peak counter updates one cycle after the rising edge of de1.
      @(posedge clk);
      #1;
      check("peak_count", int'(peak_count), edges, cyc);
    end
    // R waves whose centre sample was reached: positions 100, 388, 676, 964
    // of each pass through the record, with the centre D1 behind the address.
    for (int cyc = 1; cyc <= 2 * N + N / 2; cyc++) begin
      a = (cyc - 1) % N;
      if (a >= D1 && (a - D1) % PER == 100) beats_seen++;
    end
    check("R waves detected", beats_found, beats_seen, 0);
    $display("R waves %0d, detected %0d, de1 runs %0d (repeat detections %0d), de1 cycles %0d, de0 cycles %0d",
             beats_seen, beats_found, edges, n_multi, n_de1, n_de0);
    $display("extremes below threshold %0d, same-sign steep samples %0d, counter wraps %0d",
             n_thr_reject, n_pol_reject, n_wraps);
    checks += 5;
    if (n_de1 == 0)        begin failures++; $display("no R-peak pulse on de1"); end
    if (n_de0 == 0)        begin failures++; $display("no pulse on de0"); end
    if (n_thr_reject == 0) begin failures++; $display("threshold never rejected an extreme"); end
    if (n_pol_reject == 0) begin failures++; $display("polarity never rejected a steep sample"); end
    if (n_wraps < 2)       begin failures++; $display("address counters did not wrap"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
