// adaptive_filter: error estimate and weight update of the LMS algorithm.
//
// From the desired signal d(n) (data1), the FIR output y(n) (fir_op), the tap
// vector q = x(n) .. x(n-N_TAPS+1) and the current weights c = w(n) it forms
//   e(n)      = d(n) - y(n)
//   n_c[i]    = c[i] + 2*mu*e(n)*q[i]        (the weights w(n+1))
// The block uses N_TAPS+1 multipliers: one for 2*mu*e(n) and one per tap for
// the scalar-by-vector product. 2*mu is the parameter MU2, a positive Q1.15
// constant. Every product is brought back to Q1.15 by rounding to the nearest
// LSB. The error, the scaled error 2*mu*e(n) and each new weight are
// clipped to 16 bits, and sat_e / sat_g / sat_c report when a clip happened.
//
// Interface and timing: purely combinational. The caller registers data1
// together with the sample, and loads n_c into the weight registers on the
// next sample strobe. The equations, the port names data1, fir_op, q, error
// and n_c and the 16-bit widths follow the design. The number format, the
// step-size value and the clipping are this design's own choices.
module adaptive_filter
#(
  parameter int unsigned         N_TAPS = lms_pkg::LMS_N_TAPS,
  parameter int unsigned         W      = lms_pkg::LMS_W,
  parameter int unsigned         FRAC   = lms_pkg::LMS_FRAC,
  parameter logic signed [W-1:0] MU2    = lms_pkg::LMS_MU2
) (
  input  logic signed [W-1:0] data1,
  input  logic signed [W-1:0] fir_op,
  input  logic signed [W-1:0] q   [N_TAPS],
  input  logic signed [W-1:0] c   [N_TAPS],
  output logic signed [W-1:0] error,
  output logic signed [W-1:0] n_c [N_TAPS],
  output logic                sat_e,
  output logic                sat_g,
  output logic                sat_c
);

  logic signed [63:0] e_w, g_w;

  always_comb begin
    logic sat_i;
    // Equation (1.3): e(n) = d(n) - y(n).
    e_w   = lms_pkg::clip(64'(data1) - 64'(fir_op), W, sat_e);
    error = e_w[W-1:0];
    // 2*mu*e(n), one multiplication shared by all taps.
    g_w   = lms_pkg::clip(lms_pkg::round_shift(64'(MU2) * e_w, FRAC), W, sat_g);
    // Equation (1.4): w(n+1) = w(n) + 2*mu*e(n)*x(n), tap by tap.
    sat_c = 1'b0;
    for (int i = 0; i < int'(N_TAPS); i++) begin
      n_c[i] = W'(lms_pkg::clip(64'(c[i]) + lms_pkg::round_shift(g_w * 64'(q[i]), FRAC), W, sat_i));
      sat_c  = sat_c | sat_i;
    end
  end

endmodule
