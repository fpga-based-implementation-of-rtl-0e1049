// addr_counter: free-running ROM address counter.
//
// The detector processes its stored ECG record one sample per clock. Each
// sample ROM is addressed by one of these counters, as in the reference
// architecture, where three identical counters run in lock step. The counter
// counts up by one every clock and wraps from 2**WIDTH-1 back to 0, so the
// stored record is replayed endlessly. The wrap behaviour and the
// synchronous, active-high reset to 0 are this design's choices.
//
// Interface: clk, rst (synchronous, active high), count (current address).
// Timing: count is a register; it is 0 in the cycle after rst and increments
// every following cycle.
module addr_counter #(
  parameter int unsigned WIDTH = qrs_pkg::ADDR_W
) (
  input  logic             clk,
  input  logic             rst,
  output logic [WIDTH-1:0] count
);

  always_ff @(posedge clk) begin
    if (rst) count <= '0;
    else     count <= count + 1'b1;
  end

endmodule
