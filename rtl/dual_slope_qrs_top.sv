// dual_slope_qrs_top: dual-slope QRS (R-peak) detector.
//
// For each sample the detector looks at three samples of the stored ECG
// record: the newest one x[n], a centre one x[n-D1] and an oldest one
// x[n-D2], with D1 = 0.027 s and D2 = 2*D1. It forms the two slopes
//   SL = x[n-D1] - x[n]        (ROM2 - ROM1)
//   SR = x[n-D2] - x[n-D1]     (ROM3 - ROM2)
// and their product S_mult = SL * SR. The centre sample is reported as an
// R peak (de1 = 1) when |S_mult| exceeds THRESHOLD and the slopes have
// opposite signs (XOR of their MSBs). A steep product whose slopes have the
// same sign is reported on de0 instead.
//
// Structure, following the reference architecture: three 10-bit address
// counters running in lock step, three 1Kx8 ROMs holding the record with
// delays 0, D1 and D2 built into their contents, two 8-bit subtractors, a
// multiplier, a threshold comparator, an XOR polarity check and a 1-to-2
// demultiplexer. This design adds a peak counter on de1 (the reference
// only suggests one) and brings its count out; the threshold is the
// THRESHOLD parameter. The ROMs hold the built-in synthetic record of
// qrs_pkg::ecg_synth unless INIT_FILE names a hex file of samples.
//
// Interface: clk, rst (synchronous, active high); de0, de1 outputs;
// peak_count (rising edges of de1 since reset).
// Timing: one sample per clock. The counters hold address n in some cycle,
// the ROM words for address n appear in the next cycle, and de0/de1 follow
// combinationally in that same cycle. de0/de1 are 0 in the first cycle
// after reset because the ROM output registers are cleared.
module dual_slope_qrs_top #(
  parameter int unsigned DATA_W    = qrs_pkg::DATA_W,
  parameter int unsigned ADDR_W    = qrs_pkg::ADDR_W,
  parameter int unsigned D1        = qrs_pkg::D1_SAMP,
  parameter int unsigned D2        = qrs_pkg::D2_SAMP,
  parameter int unsigned THRESHOLD = qrs_pkg::THRESH_DEFAULT,
  parameter int unsigned CNT_W     = 16,
  parameter string       INIT_FILE = ""
) (
  input  logic             clk,
  input  logic             rst,
  output logic             de0,
  output logic             de1,
  output logic [CNT_W-1:0] peak_count
);

  localparam int unsigned PROD_W = 2 * DATA_W;

  logic [ADDR_W-1:0] count1, count2, count3;
  logic [DATA_W-1:0] out1, out2, out3;   // newest, centre, oldest sample
  logic [DATA_W-1:0] sl, sr;
  logic              carryo1, carryo2;
  logic signed [PROD_W-1:0] prod;
  logic              thresh, pole;

  // Address counters, one per ROM.
  addr_counter #(.WIDTH(ADDR_W)) u_counter1 (.clk, .rst, .count(count1));
  addr_counter #(.WIDTH(ADDR_W)) u_counter2 (.clk, .rst, .count(count2));
  addr_counter #(.WIDTH(ADDR_W)) u_counter3 (.clk, .rst, .count(count3));

  // Sample ROMs: delays 0, D1 and D2 are built into the contents.
  ecg_rom #(.DATA_W(DATA_W), .ADDR_W(ADDR_W), .DELAY(0),  .INIT_FILE(INIT_FILE))
    u_rom1 (.clk, .rst, .addr(count1), .dout(out1));
  ecg_rom #(.DATA_W(DATA_W), .ADDR_W(ADDR_W), .DELAY(D1), .INIT_FILE(INIT_FILE))
    u_rom2 (.clk, .rst, .addr(count2), .dout(out2));
  ecg_rom #(.DATA_W(DATA_W), .ADDR_W(ADDR_W), .DELAY(D2), .INIT_FILE(INIT_FILE))
    u_rom3 (.clk, .rst, .addr(count3), .dout(out3));

  // Slope calculation: SL = centre - newest, SR = oldest - centre.
  slope_sub #(.DATA_W(DATA_W)) u_subtr1 (.a(out2), .b(out1), .diff(sl), .carry_out(carryo1));
  slope_sub #(.DATA_W(DATA_W)) u_subtr2 (.a(out3), .b(out2), .diff(sr), .carry_out(carryo2));

  slope_mult #(.DATA_W(DATA_W)) u_multiply (.sl(sl), .sr(sr), .prod(prod));

  threshold_cmp #(.PROD_W(PROD_W)) u_compar (
    .prod(prod), .ref_in(PROD_W'(THRESHOLD)), .above(thresh));

  polarity_xor u_xor21 (.sl_msb(sl[DATA_W-1]), .sr_msb(sr[DATA_W-1]), .opposite(pole));

  decision_demux u_demux (.din(thresh), .sel(pole), .de0(de0), .de1(de1));

  peak_counter #(.WIDTH(CNT_W)) u_peak_counter (
    .clk, .rst, .pulse(de1), .count(peak_count));

  // The subtractor carries are kept for observation only; the slope sign
  // is taken from the MSB of the difference, as in the reference.
  logic unused_carry;
  assign unused_carry = carryo1 ^ carryo2;

  // The three counters must stay in lock step: all ROMs are read at one address.
  always_ff @(posedge clk)
    if (!rst) assert (count1 == count2 && count2 == count3)
      else $error("address counters out of step");

endmodule
