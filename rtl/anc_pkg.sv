// anc_pkg - shared types, constants and fixed-point helpers of the active
// noise cancellation datapath.
//
// Samples, filter weights and errors are Q18 fixed-point numbers: 19 bits in
// two's complement, one sign bit followed by 18 fractional bits, so a value
// v stands for v / 2^18 and covers [-1, 1). This word format is the one the
// design is built around; everything else here (the AC-link framing numbers,
// the saturation helper) is standard AC'97 practice or this design's choice.
package anc_pkg;

  // Q18 word: 1 sign bit + 18 fraction bits.
  localparam int unsigned Q_FRAC   = 18;
  localparam int unsigned SAMPLE_W = Q_FRAC + 1;

  typedef logic signed [SAMPLE_W-1:0] sample_t;

  // Adaptive filter length used by the design (filter order 29).
  localparam int unsigned LMS_TAPS = 29;

  // AC'97 link framing: 256 bit-clock periods per frame, 13 slots, slot 0 is
  // 16 bits wide and slots 1..12 are 20 bits wide.
  localparam int unsigned AC97_FRAME_BITS = 256;
  localparam int unsigned AC97_TAG_BITS   = 16;
  localparam int unsigned AC97_SLOT_W     = 20;

  // First bit period (0-based within the frame) of slot s, s >= 1.
  function automatic int unsigned ac97_slot_start(input int unsigned s);
    return AC97_TAG_BITS + (s - 1) * AC97_SLOT_W;
  endfunction

  // Width of the signed step-size shift that covers smin .. smax.
  function automatic int unsigned shift_w(input int smin, input int smax);
    int m;
    m = (smax > -smin) ? smax : -smin;
    return $clog2(m + 1) + 1;
  endfunction

  // Clamp a wide signed value into a signed word of 'width' bits (width <= 63).
  function automatic logic signed [63:0] sat_to(input logic signed [63:0] v,
                                                input int unsigned width);
    logic signed [63:0] hi, lo;
    hi = (64'sd1 <<< (width - 1)) - 64'sd1;
    lo = -(64'sd1 <<< (width - 1));
    if (v > hi) return hi;
    if (v < lo) return lo;
    return v;
  endfunction

  // True when sat_to(v, width) would clip.
  function automatic logic clips(input logic signed [63:0] v,
                                 input int unsigned width);
    logic signed [63:0] hi, lo;
    hi = (64'sd1 <<< (width - 1)) - 64'sd1;
    lo = -(64'sd1 <<< (width - 1));
    return (v > hi) || (v < lo);
  endfunction

endpackage
