// qrs_pkg: widths and defaults shared by the dual-slope QRS detector.
//
// The detector works on 8-bit ECG samples kept in 1K-deep ROMs, so the
// address counters are 10 bits wide and the slope product is 16 bits wide.
// Those three numbers follow the reference architecture (1Kx8 ROMs, 8-bit
// subtractors, a 16-bit product). The sampling rate is 360 Hz and the slope
// distance is the nearest integer to 0.027 s at that rate, i.e. 10 samples.
// The threshold default and the built-in synthetic ECG record (ecg_synth)
// are this design's own choices: the reference detector was run on a
// 10 s clinical record that is not part of this RTL.
package qrs_pkg;

  localparam int unsigned DATA_W   = 8;    // bits per ECG sample
  localparam int unsigned ADDR_W   = 10;   // 1K-deep sample ROMs
  localparam int unsigned PROD_W   = 2 * DATA_W;  // slope product width
  localparam int unsigned D1_SAMP  = 10;   // round(0.027 * 360): centre sample
  localparam int unsigned D2_SAMP  = 2 * D1_SAMP; // oldest sample, symmetric about the centre
  localparam int unsigned THRESH_DEFAULT = 1000; // |S_mult| threshold

  typedef logic [DATA_W-1:0] sample_t;
  typedef logic [ADDR_W-1:0] addr_t;
  typedef logic signed [DATA_W-1:0] slope_t;
  typedef logic signed [PROD_W-1:0] prod_t;

  // Synthetic ECG record used as the default ROM contents: one beat every
  // 288 samples (75 beats/min at 360 Hz), QRS 0.1 s wide, built from
  // triangular waves on a
  // baseline of 80, plus a small deterministic ripple:
  //   P: centre 40,  half-width 12, +12     Q: centre 78,  half-width 4, -12
  //   R: centre 100, half-width 18, +100    S: centre 122, half-width 4, -20
  //   T: centre 190, half-width 30, +24     ripple: ((37*n) mod 5) - 2
  // p = n mod 288 is the position in the beat; a wave of amplitude A adds
  // sign(A) * floor(|A| * (hw - |p - c|) / hw) where |p - c| < hw.
  function automatic int ecg_tri(int p, int c, int hw, int amp);
    int d, m;
    d = (p > c) ? p - c : c - p;
    if (d >= hw) return 0;
    m = ((amp < 0 ? -amp : amp) * (hw - d)) / hw;
    return (amp < 0) ? -m : m;
  endfunction

  function automatic sample_t ecg_synth(int n);
    int p, v;
    p = n % 288;
    v = 80 + ecg_tri(p, 40, 12, 12) + ecg_tri(p, 78, 4, -12) + ecg_tri(p, 100, 18, 100)
           + ecg_tri(p, 122, 4, -20) + ecg_tri(p, 190, 30, 24)
           + ((n * 37) % 5) - 2;
    if (v < 0)   v = 0;
    if (v > 255) v = 255;
    return sample_t'(v);
  endfunction

endpackage
