// lms_pkg: types, sizes and the fixed-point helpers shared by the LMS adaptive
// filter.
//
// The filter is 8 taps long and all data paths are 16 bits wide. That much
// comes from the design itself. The number format is this design's own choice:
// samples, tap weights, error and step size are signed two's-complement Q1.15
// fractions, so 16'h8000 is -1.0 and 16'h7FFF is just under +1.0. Every
// product of two Q1.15 values is brought back to Q1.15 by rounding to the
// nearest LSB (ties toward plus infinity). Plain truncation would bias small
// weight updates toward minus infinity and make the weights drift. Every
// result that leaves a block is clipped to the 16-bit range rather than
// allowed to wrap.
package lms_pkg;

  parameter int unsigned LMS_N_TAPS = 8;   // filter order: taps c0 .. c7
  parameter int unsigned LMS_W      = 16;  // width of every sample and weight
  parameter int unsigned LMS_FRAC   = 15;  // fraction bits of the Q1.15 format

  // Default 2*mu in Q1.15: 2^-7 (about 0.0078), a small positive step size.
  parameter logic signed [LMS_W-1:0] LMS_MU2 = 16'sh0100;

  // Clip a wide signed value to the range of a signed number of `width` bits
  // (2..63); sat is set when the value was out of range. The result is
  // returned 64 bits wide, the caller keeps its low `width` bits. The
  // argument is 64 bits wide so that every sum and product of this design
  // fits in it without wrapping first.
  function automatic logic signed [63:0] clip(input logic signed [63:0] v,
                                              input int unsigned width,
                                              output logic sat);
    logic signed [63:0] maxv, minv;
    maxv = (64'sd1 <<< (width - 1)) - 64'sd1;
    minv = -(64'sd1 <<< (width - 1));
    sat  = (v > maxv) || (v < minv);
    if (v > maxv)      clip = maxv;
    else if (v < minv) clip = minv;
    else               clip = v;
  endfunction

  // Drop `frac` fraction bits (1..62) of a wide signed value, rounding to the
  // nearest integer with ties toward plus infinity.
  function automatic logic signed [63:0] round_shift(input logic signed [63:0] v,
                                                     input int unsigned frac);
    round_shift = (v + (64'sd1 <<< (frac - 1))) >>> frac;
  endfunction

endpackage
