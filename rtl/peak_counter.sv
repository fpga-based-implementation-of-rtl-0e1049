// peak_counter: counter of detected R peaks.
//
// The detector signals an R peak by raising de1. Near a sharp peak several
// consecutive samples can meet both criteria, so this counter increments
// once per rising edge of de1 (a run of de1 = 1 counts as one detection).
// From the count over a known number of samples the heart rate follows:
// beats per minute = count * 60 * FS / samples. Counting edges rather than
// cycles, and saturating at the maximum value, are this design's choices;
// the reference only says that the detection pulse can drive a counter.
//
// Interface: clk, rst (synchronous, active high), pulse in; count out.
// Timing: count updates in the cycle after the rising edge of pulse.
module peak_counter #(
  parameter int unsigned WIDTH = 16
) (
  input  logic             clk,
  input  logic             rst,
  input  logic             pulse,
  output logic [WIDTH-1:0] count
);

  logic pulse_q;

  always_ff @(posedge clk) begin
    if (rst) begin
      pulse_q <= 1'b0;
      count   <= '0;
    end else begin
      pulse_q <= pulse;
      if (pulse && !pulse_q && count != '1)
        count <= count + 1'b1;
    end
  end

endmodule
