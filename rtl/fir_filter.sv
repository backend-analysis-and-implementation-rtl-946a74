// fir_filter: the transversal (FIR) half of the LMS adaptive filter.
//
// It holds the last N_TAPS input samples in a shift register, q[0] = x(n)
// (newest) down to q[N_TAPS-1] = x(n-N_TAPS+1), and computes the filter
// output y(n) = sum_i c[i] * q[i] as in the standard LMS equations. Each tap
// product is kept at full precision and all of them are added in one wide
// sum. The sum is shifted back to Q1.15 and clipped to 16 bits; fir_sat
// flags a clipped result.
//
// Interface and timing: on a rising clk edge with in_valid high, data2 enters
// q[0] and every other tap moves one place down. fir_op depends
// combinationally on the registered taps and on the weight inputs c, so one
// new output is ready every clock. q_full rises on the edge that shifts in
// the N_TAPS-th sample since reset: from then on every tap holds a real sample
// instead of the reset value zero. With a sample on every clock this is 8
// clocks after the first sample. The 8 taps, the 16-bit widths and the port
// names data2, q, c and fir_op follow the design. The Q1.15 number format,
// the sample strobe, the clipping and the asynchronous active-low reset to
// zero are this design's own choices.
module fir_filter
#(
  parameter int unsigned N_TAPS = lms_pkg::LMS_N_TAPS,
  parameter int unsigned W      = lms_pkg::LMS_W,
  parameter int unsigned FRAC   = lms_pkg::LMS_FRAC
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic                in_valid,
  input  logic signed [W-1:0] data2,
  input  logic signed [W-1:0] c [N_TAPS],
  output logic signed [W-1:0] q [N_TAPS],
  output logic signed [W-1:0] fir_op,
  output logic                fir_sat,
  output logic                q_full
);

  localparam int unsigned CW = $clog2(N_TAPS + 1);

  logic [CW-1:0] fill;

  // Tapped delay line.
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < int'(N_TAPS); i++) q[i] <= '0;
    end else if (in_valid) begin
      q[0] <= data2;
      for (int i = 1; i < int'(N_TAPS); i++) q[i] <= q[i-1];
    end
  end

  // Count samples until the delay line is full.
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)                                fill <= '0;
    else if (in_valid && fill != CW'(N_TAPS)) fill <= fill + 1'b1;
  end
  assign q_full = (fill == CW'(N_TAPS));

  // Once full, the delay line stays full until the next reset.
  a_full_sticky: assert property (@(posedge clk) disable iff (!rst_n) q_full |=> q_full)
    else $error("q_full dropped without a reset");

  // Sum of products, at full precision, then back to Q1.15.
  always_comb begin
    logic signed [63:0] acc;
    acc = '0;
    for (int i = 0; i < int'(N_TAPS); i++)
      acc += 64'(c[i]) * 64'(q[i]);
    fir_op = W'(lms_pkg::clip(lms_pkg::round_shift(acc, FRAC), W, fir_sat));
  end

endmodule
