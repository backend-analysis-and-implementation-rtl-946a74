// tb_fir_filter: self-checking test of the FIR half of the LMS filter.
//
// Random 16-bit samples are shifted in (with random gaps in the sample
// strobe) while random weights are applied; a model of the delay line kept in
// the testbench gives the expected taps, and the expected filter output is
// worked out with plain integer arithmetic and clipped to 16 bits. Checks:
// every tap, fir_op (rounded to the nearest Q1.15 step), fir_sat, and that q_full rises exactly on the 8th strobe
// after reset. Some weight sets are extreme (all +1 or all -1) so that the
// output clips in both directions; the test counts that it did.
module tb_fir_filter;
  localparam int N = 8;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  logic in_valid = 1'b0;
  logic signed [15:0] data2 = '0;
  logic signed [15:0] c [N];
  logic signed [15:0] q [N];
  logic signed [15:0] fir_op;
  logic fir_sat, q_full;

  int checks = 0, failures = 0;
  int sat_hi = 0, sat_lo = 0;
  int strobes = 0;
  logic signed [15:0] model [N];

  fir_filter dut (.clk, .rst_n, .in_valid, .data2, .c, .q, .fir_op, .fir_sat, .q_full);

  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s at %0t", what, $time);
    end
  endtask

  function automatic void expect_y(output logic signed [15:0] y, output bit s);
    longint acc;
    acc = 0;
    for (int i = 0; i < N; i++) acc += longint'(c[i]) * longint'(model[i]);
    acc = (acc + 16384) >>> 15;
    s = 1'b1;
    if (acc > 32767)       y = 16'sh7fff;
    else if (acc < -32768) y = 16'sh8000;
    else begin y = 16'(acc); s = 1'b0; end
  endfunction

  task automatic compare();
    logic signed [15:0] ey;
    bit es;
    expect_y(ey, es);
    for (int i = 0; i < N; i++) check(q[i] == model[i], $sformatf("tap %0d", i));
    check(fir_op == ey, $sformatf("fir_op %0d exp %0d", fir_op, ey));
    check(fir_sat == es, "fir_sat");
    check(q_full == (strobes >= N), $sformatf("q_full after %0d strobes", strobes));
    if (es && ey > 0) sat_hi++;
    if (es && ey < 0) sat_lo++;
  endtask

  initial begin
    for (int i = 0; i < N; i++) begin c[i] = '0; model[i] = '0; end
    repeat (2) @(posedge clk);
    #1 rst_n = 1'b1;
    for (int t = 0; t < 600; t++) begin
      @(negedge clk);
      in_valid = ($urandom_range(0, 3) != 0);
      data2    = 16'($urandom);
      if (t % 50 == 20)      for (int i = 0; i < N; i++) c[i] = 16'sh7fff;
      else if (t % 50 == 40) for (int i = 0; i < N; i++) c[i] = 16'sh8000;
      else if (t % 7 == 0)   for (int i = 0; i < N; i++) c[i] = 16'($urandom) >>> $urandom_range(0, 4);
      if (t % 50 == 20 || t % 50 == 40) data2 = (t % 100 < 50) ? 16'sh7000 : 16'sh9000;
      @(posedge clk);
      if (in_valid) begin
        for (int i = N - 1; i > 0; i--) model[i] = model[i-1];
        model[0] = data2;
        strobes++;
      end
      #1 compare();
    end
    check(sat_hi > 0, "positive clipping never happened");
    check(sat_lo > 0, "negative clipping never happened");
    $display("clipped high %0d times, low %0d times", sat_hi, sat_lo);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
