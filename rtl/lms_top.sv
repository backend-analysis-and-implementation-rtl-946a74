// lms_top: 8-tap LMS adaptive filter for noise cancellation.
//
// The filter takes two 16-bit sample streams: data1, the desired signal d(n)
// (for example a recording with noise), and data2, the reference x(n)
// correlated with that noise. It adapts the tap weights w of an FIR filter so
// that the output y(n) = w(n)^T x(n) tracks d(n); the error e(n) = d(n) - y(n)
// is the cleaned signal. Each sample is one LMS iteration of three steps:
// filter (fir_filter), error and new weights (adaptive_filter), and storing
// the new weights (coeff_update):
//   y(n)   = sum_i w_i(n) x(n-i)
//   e(n)   = d(n) - y(n)
//   w(n+1) = w(n) + 2 mu e(n) x(n)
//
// Interface and timing: on a rising clk edge with in_valid high, data1 and
// data2 are taken in, and the weights computed from the previous sample are
// stored. error, fir_op and coef then belong to the new sample and are valid
// until the next strobe: one whole iteration per clock, so a sample may come
// on every clock. out_valid is high once the 8-stage delay line holds 8 real
// samples, 8 clocks after the first sample when a sample comes on every
// clock. sat is high while any clipping (filter output, error, scaled error
// or a weight) is active for the current sample. The block split and the
// names data1, data2, fir_op, error and the 8 taps follow the design; the
// sample strobe, out_valid, sat, the exposed weights coef, the Q1.15 format
// and the asynchronous active-low reset are this design's own choices.
module lms_top
#(
  parameter int unsigned         N_TAPS = lms_pkg::LMS_N_TAPS,
  parameter int unsigned         W      = lms_pkg::LMS_W,
  parameter int unsigned         FRAC   = lms_pkg::LMS_FRAC,
  parameter logic signed [W-1:0] MU2    = lms_pkg::LMS_MU2
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic                in_valid,
  input  logic signed [W-1:0] data1,
  input  logic signed [W-1:0] data2,
  output logic signed [W-1:0] error,
  output logic signed [W-1:0] fir_op,
  output logic signed [W-1:0] coef [N_TAPS],
  output logic                out_valid,
  output logic                sat
);

  logic signed [W-1:0] d_q;
  logic signed [W-1:0] q   [N_TAPS];
  logic signed [W-1:0] c   [N_TAPS];
  logic signed [W-1:0] n_c [N_TAPS];
  logic fir_sat, sat_e, sat_g, sat_c;

  // d(n) is registered with x(n) so that both belong to the same iteration.
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)        d_q <= '0;
    else if (in_valid) d_q <= data1;
  end

  fir_filter #(.N_TAPS(N_TAPS), .W(W), .FRAC(FRAC)) u_fir (
    .clk     (clk),
    .rst_n   (rst_n),
    .in_valid(in_valid),
    .data2   (data2),
    .c       (c),
    .q       (q),
    .fir_op  (fir_op),
    .fir_sat (fir_sat),
    .q_full  (out_valid)
  );

  adaptive_filter #(.N_TAPS(N_TAPS), .W(W), .FRAC(FRAC), .MU2(MU2)) u_adapt (
    .data1 (d_q),
    .fir_op(fir_op),
    .q     (q),
    .c     (c),
    .error (error),
    .n_c   (n_c),
    .sat_e (sat_e),
    .sat_g (sat_g),
    .sat_c (sat_c)
  );

  coeff_update #(.N_TAPS(N_TAPS), .W(W)) u_coef (
    .clk  (clk),
    .rst_n(rst_n),
    .load (in_valid),
    .n_c  (n_c),
    .c    (c)
  );

  assign coef = c;
  assign sat  = fir_sat | sat_e | sat_g | sat_c;

endmodule
