// coeff_update: the register bank that holds the LMS tap weights.
//
// It stores c[0] .. c[N_TAPS-1] = w(n), which the FIR filter and the weight
// update read, and loads the new weights n_c = w(n+1) on a rising clk edge
// with load high. One load per input sample closes the LMS iteration.
//
// Interface and timing: asynchronous active-low reset to zero weights, so the
// filter starts from w(0) = 0; load writes all taps at once and the new
// weights are visible right after that edge. The names c and n_c and the
// 16-bit width follow the design. The zero starting weights and the load
// strobe are this design's own choices.
module coeff_update
#(
  parameter int unsigned N_TAPS = lms_pkg::LMS_N_TAPS,
  parameter int unsigned W      = lms_pkg::LMS_W
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic                load,
  input  logic signed [W-1:0] n_c [N_TAPS],
  output logic signed [W-1:0] c   [N_TAPS]
);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < int'(N_TAPS); i++) c[i] <= '0;
    end else if (load) begin
      for (int i = 0; i < int'(N_TAPS); i++) c[i] <= n_c[i];
    end
  end

endmodule
