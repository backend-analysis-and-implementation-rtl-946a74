// tb_adaptive_filter: self-checking test of the LMS error and weight update.
//
// The block is combinational. The test applies random d(n), y(n), taps and
// weights, plus hand-picked corner cases, and compares the error, every new
// weight and the three clip flags with values worked out in the testbench:
// e = d - y, g = round(2mu * e / 2^15), n_c[i] = c[i] + round(g * q[i] / 2^15), each
// clipped to 16 bits. The step size is overridden to a large value in one
// instance so that the scaled error and the weights can clip as well.
module tb_adaptive_filter;
  localparam int N = 8;
  localparam logic signed [15:0] MU2A = 16'sh0100;
  localparam logic signed [15:0] MU2B = 16'sh7fff;

  logic signed [15:0] data1, fir_op;
  logic signed [15:0] q [N];
  logic signed [15:0] c [N];
  logic signed [15:0] err_a, err_b;
  logic signed [15:0] nc_a [N];
  logic signed [15:0] nc_b [N];
  logic se_a, sg_a, sc_a, se_b, sg_b, sc_b;

  int checks = 0, failures = 0;
  int n_se = 0, n_sc = 0;

  adaptive_filter dut_a (.data1, .fir_op, .q, .c, .error(err_a), .n_c(nc_a),
                         .sat_e(se_a), .sat_g(sg_a), .sat_c(sc_a));
  adaptive_filter #(.MU2(MU2B)) dut_b (.data1, .fir_op, .q, .c, .error(err_b), .n_c(nc_b),
                         .sat_e(se_b), .sat_g(sg_b), .sat_c(sc_b));

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s", what);
    end
  endtask

  function automatic longint sat16(input longint v, inout bit s);
    if (v > 32767)  begin s = 1'b1; return 32767;  end
    if (v < -32768) begin s = 1'b1; return -32768; end
    return v;
  endfunction

  task automatic verify(input logic signed [15:0] mu2, input logic signed [15:0] err,
                        input logic signed [15:0] nc [N], input logic se, input logic sg,
                        input logic sc, input string tag);
    longint e, g, w;
    bit s_e, s_g, s_c;
    s_e = 0; s_g = 0; s_c = 0;
    e = sat16(longint'(data1) - longint'(fir_op), s_e);
    g = sat16((longint'(mu2) * e + 16384) >>> 15, s_g);
    check(err == 16'(e), $sformatf("%s error %0d exp %0d", tag, err, e));
    check(se == s_e, {tag, " sat_e"});
    check(sg == s_g, {tag, " sat_g"});
    for (int i = 0; i < N; i++) begin
      w = sat16(longint'(c[i]) + ((g * longint'(q[i]) + 16384) >>> 15), s_c);
      check(nc[i] == 16'(w), $sformatf("%s n_c[%0d] %0d exp %0d", tag, i, nc[i], w));
    end
    check(sc == s_c, {tag, " sat_c"});
    if (s_e) n_se++;
    if (s_c) n_sc++;
  endtask

  initial begin
    for (int t = 0; t < 3000; t++) begin
      data1  = 16'($urandom);
      fir_op = 16'($urandom);
      for (int i = 0; i < N; i++) begin
        q[i] = 16'($urandom);
        c[i] = 16'($urandom);
      end
      case (t % 10)
        0: begin data1 = 16'sh7fff; fir_op = 16'sh8000; end
        1: begin data1 = 16'sh8000; fir_op = 16'sh7fff; end
        2: begin data1 = 16'sh1234; fir_op = 16'sh1234; end
        3: for (int i = 0; i < N; i++) c[i] = 16'sh7ff0;
        default: ;
      endcase
      #1;
      verify(MU2A, err_a, nc_a, se_a, sg_a, sc_a, "mu_small");
      verify(MU2B, err_b, nc_b, se_b, sg_b, sc_b, "mu_large");
    end
    // A hand-worked case: d = 0.5, y = 0.25 -> e = 0.25 (8192);
    // 2mu = 2^-7 -> g = 8192 * 256 >> 15 = 64; q[0] = 0.5 (16384)
    // -> delta = 64 * 16384 >> 15 = 32; c[0] = 100 -> 132.
    data1 = 16'sd16384; fir_op = 16'sd8192;
    for (int i = 0; i < N; i++) begin q[i] = '0; c[i] = 16'sd100; end
    q[0] = 16'sd16384;
    #1;
    check(err_a == 16'sd8192, "worked example error");
    check(nc_a[0] == 16'sd132, $sformatf("worked example n_c[0] = %0d", nc_a[0]));
    check(nc_a[1] == 16'sd100, "worked example n_c[1]");
    check(n_se > 0, "error clipping never happened");
    check(n_sc > 0, "weight clipping never happened");
    $display("error clipped %0d times, weights clipped %0d times", n_se, n_sc);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
