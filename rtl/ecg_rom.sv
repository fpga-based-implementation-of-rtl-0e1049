// ecg_rom: single-port block ROM holding the ECG record.
//
// The detector reads three versions of the same record in parallel: the
// record itself (ROM1), the record delayed by D1 samples (ROM2, the centre
// sample) and the record delayed by D2 samples (ROM3). As in the reference
// architecture the delay is applied when the ROM contents are prepared, not
// by a delay line in the datapath, so all three ROMs are read at the same
// address. Here the DELAY parameter does that preparation: word i holds
// sample i-DELAY of the record, and the first DELAY words repeat sample 0
// (the record is taken to sit at its first value before it starts). That
// fill rule is this design's choice.
//
// The record is the synthetic ECG qrs_pkg::ecg_synth, computed at
// elaboration, unless INIT_FILE names a $readmemh file of 2**ADDR_W hex
// words (for example a real 360 Hz record scaled to 8 bits). Note that some
// synthesis front ends ignore $readmemh; the built-in record needs no file.
//
// Interface: clk, rst, addr in; dout out. The ROM is 2**ADDR_W words of
// DATA_W bits (1Kx8 by default).
// Timing: synchronous read, one cycle of latency, like a block RAM with a
// registered output. rst clears the output register synchronously (the
// block RAM's set/reset pin), so the first read word appears one cycle
// after rst is released.
module ecg_rom #(
  parameter int unsigned DATA_W    = qrs_pkg::DATA_W,
  parameter int unsigned ADDR_W    = qrs_pkg::ADDR_W,
  parameter int unsigned DELAY     = 0,
  parameter string       INIT_FILE = ""
) (
  input  logic              clk,
  input  logic              rst,
  input  logic [ADDR_W-1:0] addr,
  output logic [DATA_W-1:0] dout
);

  localparam int unsigned DEPTH = 1 << ADDR_W;

  logic [DATA_W-1:0] raw [DEPTH];
  logic [DATA_W-1:0] mem [DEPTH];

  initial begin
    if (INIT_FILE != "") $readmemh(INIT_FILE, raw);
    else for (int i = 0; i < DEPTH; i++) raw[i] = DATA_W'(qrs_pkg::ecg_synth(i));
    for (int i = 0; i < DEPTH; i++)
      mem[i] = (i >= int'(DELAY)) ? raw[i - int'(DELAY)] : raw[0];
  end

  always_ff @(posedge clk) begin
    if (rst) dout <= '0;
    else     dout <= mem[addr];
  end

endmodule
