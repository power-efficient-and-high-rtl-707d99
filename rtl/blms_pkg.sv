// blms_pkg: widths and small helpers shared by the DA block-LMS filter.
//
// The filter works on 16-bit two's-complement samples and 16-bit weights,
// both read as Q1.15 fractions. A DA look-up table (LUT) word is the sum of up
// to four weights, so it needs two guard bits; the adder tree adds N/4 such
// words; the serial accumulator adds XW shifted copies of that sum, giving the
// full-precision inner product of width ACC_W.
//
// The 16-tap length, the four-weight LUT groups and the 16-bit data and weight
// widths follow the source design. The Q1.15 reading, the guard widths, the
// step size and the saturation rules are this design's own choices.
package blms_pkg;

  localparam int unsigned N_TAPS  = 16;  // filter length
  localparam int unsigned BLOCK_L = 16;  // block size, equal to the filter length
  localparam int unsigned XW      = 16;  // input / desired / output / error width
  localparam int unsigned WW      = 16;  // weight width
  localparam int unsigned FRAC    = 15;  // fraction bits of Q1.15 (= WW-1 at the default widths)
  localparam int unsigned MU_SHIFT_DEF = 6;  // step size mu = 2**-MU_SHIFT

  // Saturate a wide signed value to W bits (W <= 64).
  function automatic logic signed [63:0] sat_to(input logic signed [63:0] v, input int unsigned w);
    logic signed [63:0] hi, lo;
    hi = (64'sd1 <<< (w - 1)) - 64'sd1;
    lo = -(64'sd1 <<< (w - 1));
    if (v > hi) return hi;
    if (v < lo) return lo;
    return v;
  endfunction

endpackage
