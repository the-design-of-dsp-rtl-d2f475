// tb_fp_util: conversions between SystemVerilog real (double precision) and
// 32-bit single-precision words, and a tolerance compare. The reference model
// of every testbench computes in double precision with these helpers, so it
// does not share code with the design's own floating-point functions.
package tb_fp_util;

  function automatic real f2r(input logic [31:0] f);
    logic [63:0] d;
    if (f[30:23] == 8'd0) return 0.0;
    d = {f[31], 11'(int'(f[30:23]) - 127 + 1023), f[22:0], 29'd0};
    return $bitstoreal(d);
  endfunction

  function automatic logic [31:0] r2f(input real r);
    logic [63:0] d;
    int          e;
    logic [24:0] m;
    if (r == 0.0) return 32'd0;
    d = $realtobits(r);
    e = int'(d[62:52]) - 1023 + 127;
    m = {1'b0, 1'b1, d[51:29]} + 25'(d[28]);
    if (m[24]) begin
      m = m >> 1;
      e = e + 1;
    end
    if (e <= 0) return 32'd0;
    if (e >= 255) return {d[63], 31'h7F80_0000};
    return {d[63], 8'(e), m[22:0]};
  endfunction

  function automatic real fabs(input real r);
    return r < 0.0 ? -r : r;
  endfunction

  // |got - want| <= tol * scale, where scale defaults to |want|
  function automatic bit close(input real got, input real want, input real tol, input real scale = 0.0);
    real s;
    s = (scale == 0.0) ? fabs(want) : scale;
    if (s < 1.0e-30) s = 1.0e-30;
    return fabs(got - want) <= tol * s;
  endfunction

endpackage
