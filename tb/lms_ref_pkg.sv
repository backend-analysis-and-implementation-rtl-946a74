// lms_ref_pkg: bit-exact reference model of the 8-tap LMS filter, for the
// testbenches.
//
// It repeats one LMS iteration in plain 64-bit integer arithmetic, written
// independently of the RTL: y = sum c[i] q[i], e = d - y, g = 2mu e,
// c[i] += g q[i]. Every product is brought back to Q1.15 by adding 2^14 and
// shifting right 15 places (round to nearest), and every result is clipped
// to [-32768, 32767]. step() models one clock edge with the sample strobe
// high; outputs() gives what the filter shows between two strobes.
package lms_ref_pkg;

  localparam int N = 8;

  class lms_ref;
    longint q [N];
    longint c [N];
    longint d;
    int     fill;
    longint mu2;

    function new(longint mu2_q15);
      mu2 = mu2_q15;
      reset();
    endfunction

    function void reset();
      foreach (q[i]) q[i] = 0;
      foreach (c[i]) c[i] = 0;
      d = 0;
      fill = 0;
    endfunction

    static function longint sat16(longint v, inout bit s);
      if (v > 32767)  begin s = 1'b1; return 32767;  end
      if (v < -32768) begin s = 1'b1; return -32768; end
      return v;
    endfunction

    // y(n), e(n), the next weights and the clip flag for the current state.
    function void outputs(output longint y, output longint e, output longint nc [N],
                          output bit s);
      longint acc, g;
      s = 1'b0;
      acc = 0;
      foreach (c[i]) acc += c[i] * q[i];
      y = sat16((acc + 16384) >>> 15, s);
      e = sat16(d - y, s);
      g = sat16((mu2 * e + 16384) >>> 15, s);
      foreach (c[i]) nc[i] = sat16(c[i] + ((g * q[i] + 16384) >>> 15), s);
    endfunction

    // A clock edge with the strobe high and inputs d(n), x(n).
    function void step(longint d_in, longint x_in);
      longint y, e, nc [N];
      bit s;
      outputs(y, e, nc, s);
      c = nc;
      for (int i = N - 1; i > 0; i--) q[i] = q[i-1];
      q[0] = x_in;
      d = d_in;
      if (fill < N) fill++;
    endfunction

    function bit full();
      return fill == N;
    endfunction
  endclass

endpackage
