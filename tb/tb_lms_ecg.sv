// tb_lms_ecg: the LMS filter removing mains hum from an ECG-like signal.
//
// This is the application the filter is meant for: a heart signal sampled at
// 1 kHz with 16-bit samples, spoiled by 50 Hz interference. data1 carries the
// recording d(n) = ecg(n) + hum(n); data2 carries a clean 50 Hz reference
// x(n) with a different amplitude and phase. The 8-tap filter learns the
// gain and phase that turn x into the hum, so the error output becomes the
// cleaned ECG.
//
// The synthetic ECG is a sum of Gaussian bumps (P, Q, R, S and T waves) at
// 72 beats per minute. The filter clock runs 50 times faster than the sample
// strobe here; the filter does not care how far apart the strobes are.
// Twelve seconds of signal (12000 samples) are run with the default sizes
// and step size. Checks: at every strobe, error, fir_op and the weights
// against the bit-exact model of lms_ref_pkg; at the end, that the hum left
// in the error over the last 2 seconds is at least 100 times (20 dB) below
// the hum at the input.
module tb_lms_ecg;
  localparam int  N      = 8;
  localparam int  NSAMP  = 12000;
  localparam int  CLKS_PER_SAMPLE = 50;
  localparam real FS     = 1000.0;
  localparam real PI     = 3.14159265358979;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  logic in_valid = 1'b0;
  logic signed [15:0] data1 = '0, data2 = '0;
  logic signed [15:0] error, fir_op;
  logic signed [15:0] coef [N];
  logic out_valid, sat;

  int checks = 0, failures = 0;
  lms_ref_pkg::lms_ref model = new(256);

  lms_top dut (.clk, .rst_n, .in_valid, .data1, .data2, .error, .fir_op, .coef,
               .out_valid, .sat);

  always #5 clk = ~clk;

  initial begin
    repeat ((NSAMP + 10) * CLKS_PER_SAMPLE) @(posedge clk);
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

  function automatic real bump(input real t, input real mu, input real sig, input real a);
    return a * $exp(-((t - mu) * (t - mu)) / (2.0 * sig * sig));
  endfunction

  // Synthetic ECG in Q1.15 units, one beat every 60/72 s.
  function automatic real ecg(input int n);
    real t;
    t = (n % 833) / FS;
    return bump(t, 0.20, 0.025, 2500.0) + bump(t, 0.33, 0.008, -1500.0) +
           bump(t, 0.36, 0.010, 12000.0) + bump(t, 0.39, 0.008, -2500.0) +
           bump(t, 0.60, 0.040, 3500.0);
  endfunction

  initial begin
    longint d, x, y, e, nc [N], clean;
    bit s;
    real hum_in, hum_out;
    hum_in = 0.0;
    hum_out = 0.0;
    repeat (3) @(posedge clk);
    @(negedge clk) rst_n = 1'b1;
    for (int n = 0; n < NSAMP; n++) begin
      real hum;
      clean = longint'($rtoi(ecg(n)));
      hum   = 6000.0 * $sin(2.0 * PI * 50.0 * n / FS + 1.0);
      d     = clean + longint'($rtoi(hum));
      x     = longint'($rtoi(12000.0 * $sin(2.0 * PI * 50.0 * n / FS)));
      @(negedge clk);
      in_valid = 1'b1;
      data1 = 16'(d);
      data2 = 16'(x);
      @(posedge clk);
      model.step(d, x);
      @(negedge clk);
      in_valid = 1'b0;
      model.outputs(y, e, nc, s);
      check(error == 16'(e), $sformatf("error %0d exp %0d", error, e));
      check(fir_op == 16'(y), "fir_op");
      for (int i = 0; i < N; i++) check(coef[i] == 16'(model.c[i]), "coef");
      check(out_valid == model.full(), "out_valid");
      check(sat == s, "sat");
      if (n >= NSAMP - 2000) begin
        hum_in  += hum * hum;
        hum_out += real'(e - clean) * real'(e - clean);
      end
      repeat (CLKS_PER_SAMPLE - 2) @(posedge clk);
    end
    check(hum_out * 100.0 < hum_in, "hum not reduced by 20 dB");
    $display("hum power in %0.0f, left in error %0.0f (reduction %0.1f dB)",
             hum_in / 2000.0, hum_out / 2000.0, 10.0 * $log10(hum_in / hum_out));
    $display("final weights %0d %0d %0d %0d %0d %0d %0d %0d", coef[0], coef[1], coef[2],
             coef[3], coef[4], coef[5], coef[6], coef[7]);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
