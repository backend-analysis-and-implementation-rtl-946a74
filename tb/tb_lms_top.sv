// tb_lms_top: end-to-end test of the 8-tap LMS adaptive filter at its default
// sizes (8 taps, 16-bit Q1.15 data, 2*mu = 2^-7).
//
// The filter is used as a noise canceller. The reference input data2 is a
// random noise sequence x(n). The desired input data1 is a small periodic
// pulse train s(n) (standing in for a heartbeat) plus that noise passed
// through an unknown 8-tap path h, d(n) = s(n) + sum h_i x(n-i). After
// adaptation the weights approach h and the error e(n) approaches s(n).
//
// Checks, cycle by cycle, against the bit-exact model of lms_ref_pkg:
// fir_op, error, all weights, sat and out_valid.
// Beyond that it checks that the noise left in the error falls at least a
// hundredfold, that every weight ends within 400 LSB of h, and that out_valid
// rises exactly 8 clocks after the first sample when a sample comes on every
// clock (one new result per clock is covered by the cycle-by-cycle compare).
// It also makes each mechanism happen and counts it: gaps in the sample
// strobe (state must hold), clipping (a burst of full-scale input), and a
// reset in the middle of the run.
module tb_lms_top;
  localparam int N = 8;
  localparam int NSAMP = 24000;
  localparam longint MU2 = 256;      // 2^-7 in Q1.15, the design default

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  logic in_valid = 1'b0;
  logic signed [15:0] data1 = '0, data2 = '0;
  logic signed [15:0] error, fir_op;
  logic signed [15:0] coef [N];
  logic out_valid, sat;

  int checks = 0, failures = 0;
  int n_stall = 0, n_sat = 0, n_reset = 0, n_fill = 0;

  lms_ref_pkg::lms_ref model = new(MU2);

  // Unknown noise path h (Q1.15).
  longint h [N] = '{9830, -6554, 4915, 3277, -2458, 1638, -819, 410};
  longint hx [N];   // history of x for building d

  lms_top dut (.clk, .rst_n, .in_valid, .data1, .data2, .error, .fir_op, .coef,
               .out_valid, .sat);

  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL %s at %0t", what, $time);
    end
  endtask

  function automatic longint sat16(input longint v, inout bit s);
    return lms_ref_pkg::lms_ref::sat16(v, s);
  endfunction

  task automatic compare();
    longint y, e, nc [N];
    bit s;
    model.outputs(y, e, nc, s);
    check(fir_op == 16'(y), $sformatf("fir_op %0d exp %0d", fir_op, y));
    check(error == 16'(e), $sformatf("error %0d exp %0d", error, e));
    check(sat == s, "sat");
    check(out_valid == model.full(), "out_valid");
    for (int i = 0; i < N; i++) check(coef[i] == 16'(model.c[i]), $sformatf("coef[%0d]", i));
    if (s) n_sat++;
  endtask

  // Pulse train standing in for the wanted signal: a short spike every 250
  // samples (a heartbeat at 1 kHz sampling), zero in between.
  function automatic longint pulse(input int n);
    int p = n % 250;
    if (p < 5) return 3000 - 500 * p;
    return 0;
  endfunction

  longint noise_first, noise_last;
  int first_valid_cycle;

  initial begin
    longint x, d, acc, y, e, nc [N];
    bit s, v;
    int n, cyc;
    for (int i = 0; i < N; i++) hx[i] = 0;
    noise_first = 0; noise_last = 0;
    first_valid_cycle = -1;
    repeat (3) @(posedge clk);
    @(negedge clk) rst_n = 1'b1;
    n = 0; cyc = 0;
    while (n < NSAMP) begin
      @(negedge clk);
      // Strobe on every clock at first (to time the fill), later with gaps.
      v = (n < 64) ? 1'b1 : ($urandom_range(0, 4) != 0);
      // Full-scale burst to drive the arithmetic into clipping.
      if (n >= 3000 && n < 3010) x = (n % 2 == 0) ? 32767 : -32768;
      else x = longint'($urandom_range(0, 32767)) - 16384;   // about +-0.5
      if (v) begin
        for (int i = N - 1; i > 0; i--) hx[i] = hx[i-1];
        hx[0] = x;
      end
      acc = 0;
      for (int i = 0; i < N; i++) acc += h[i] * hx[i];
      d = sat16(pulse(n) + (acc >>> 15), s);
      // During the burst d is driven against the noise so that e clips.
      if (n >= 3000 && n < 3010) d = (x > 0) ? -32768 : 32767;
      in_valid = v;
      data1 = 16'(d);
      data2 = 16'(x);
      @(posedge clk);
      cyc++;
      if (v) model.step(d, x);
      if (!v) n_stall++;
      #1 compare();
      if (out_valid && first_valid_cycle < 0) begin
        first_valid_cycle = cyc;
        n_fill++;
      end
      if (v) begin
        // Noise left in the error: e(n) - s(n) over the first and last 2000.
        model.outputs(y, e, nc, s);
        if (n >= 8 && n < 2008)            noise_first += (e - pulse(n)) * (e - pulse(n));
        if (n >= NSAMP - 2000)             noise_last  += (e - pulse(n)) * (e - pulse(n));
        n++;
      end
      // Reset in the middle of the run: all state returns to zero.
      if (n == 12000 && v) begin
        @(negedge clk);
        rst_n = 1'b0;
        in_valid = 1'b0;
        #1;
        model.reset();
        for (int i = 0; i < N; i++) hx[i] = 0;
        compare();
        n_reset++;
        @(negedge clk) rst_n = 1'b1;
      end
    end
    check(first_valid_cycle == N, $sformatf("out_valid after %0d clocks, expected %0d",
                                            first_valid_cycle, N));
    check(noise_last * 100 < noise_first, $sformatf("noise power %0d -> %0d",
                                                   noise_first / 2000, noise_last / 2000));
    for (int i = 0; i < N; i++)
      check(longint'(coef[i]) - h[i] < 400 && h[i] - longint'(coef[i]) < 400,
            $sformatf("weight %0d = %0d, path %0d", i, coef[i], h[i]));
    check(n_stall > 0, "no strobe gap happened");
    check(n_sat > 0, "no clipping happened");
    check(n_reset > 0, "no mid-run reset happened");
    check(n_fill > 0, "delay line never filled");
    $display("mean noise power in error: first 2000 samples %0d, last 2000 samples %0d",
             noise_first / 2000, noise_last / 2000);
    $display("final weights %0d %0d %0d %0d %0d %0d %0d %0d", coef[0], coef[1], coef[2],
             coef[3], coef[4], coef[5], coef[6], coef[7]);
    $display("strobe gaps %0d, clipped samples %0d, resets %0d, fills %0d",
             n_stall, n_sat, n_reset, n_fill);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
