// fp_pkg: IEEE-754 single-precision arithmetic shared by every computing
// module of the tracking co-processor.
//
// The co-processor works entirely on 32-bit floating-point words, the format
// the DSP writes over its memory interface and the format the arithmetic
// units exchange. This package holds the word type, a few constants and
// combinational functions for add/subtract, multiply, divide, square root and
// the exponential. The pipelined units (fp_mul, fp_addsub, fp_div, fp_sqrt,
// fp_exp) call these functions and register the result through a delay line,
// so the latency of each unit is a parameter.
//
// Number handling is this design's own choice: subnormal inputs and results
// are flushed to zero, results round to nearest (ties away from zero),
// overflow saturates to infinity, and NaN is not generated or propagated.
// The exponential reduces its argument by ln 2 and evaluates a degree-7
// Taylor polynomial, which is accurate to a few units in the last place.
package fp_pkg;

  typedef logic [31:0] fp32_t;

  localparam fp32_t FP_ZERO    = 32'h0000_0000;
  localparam fp32_t FP_ONE     = 32'h3F80_0000;
  localparam fp32_t FP_INF     = 32'h7F80_0000;
  localparam fp32_t FP_LN2     = 32'h3F31_7218;  // 0.693147
  localparam fp32_t FP_LOG2E   = 32'h3FB8_AA3B;  // 1.442695
  localparam fp32_t FP_2PI_CUB = 32'h4378_0CDB;  // (2*pi)^3 = 248.0502

  // Pack sign, biased exponent and a 24-bit significand with 3 extra bits
  // (guard, round, sticky folded into bit 0) into a word, with rounding.
  // sig has its leading one at bit 26 when exp is the true biased exponent.
  function automatic fp32_t fp_pack(input logic s, input int e, input logic [26:0] sig);
    logic [24:0] r;
    int          ee;
    ee = e;
    r  = {1'b0, sig[26:3]} + 25'(sig[2]);
    if (r[24]) begin
      r  = r >> 1;
      ee = ee + 1;
    end
    if (ee <= 0)        return FP_ZERO;
    else if (ee >= 255) return {s, FP_INF[30:0]};
    else                return {s, 8'(ee), r[22:0]};
  endfunction

  function automatic fp32_t fp_neg(input fp32_t a);
    return {~a[31], a[30:0]};
  endfunction

  // a + b, or a - b when sub is set.
  function automatic fp32_t fp_add(input fp32_t a, input fp32_t b, input logic sub);
    logic        sa, sb, sr;
    int          ea, eb, er, d;
    logic [5:0]  lz;
    logic [49:0] ma, mb, mr;
    logic [26:0] sig;
    logic        sticky;
    sa = a[31];
    sb = b[31] ^ sub;
    ea = int'(a[30:23]);
    eb = int'(b[30:23]);
    if (ea == 0 && eb == 0) return FP_ZERO;
    if (ea == 0) return {sb, b[30:0]};
    if (eb == 0) return a;
    // 24-bit significands placed high in a 50-bit field, 26 bits of room below
    ma = {1'b0, 1'b1, a[22:0], 25'd0};
    mb = {1'b0, 1'b1, b[22:0], 25'd0};
    if (ea < eb || (ea == eb && a[22:0] < b[22:0])) begin
      {ma, mb} = {mb, ma};
      {sa, sb} = {sb, sa};
      {ea, eb} = {eb, ea};
    end
    d = ea - eb;
    if (d > 27) begin
      sticky = 1'b1;
      mb     = '0;
    end else begin
      sticky = |(mb & ((50'd1 << d) - 50'd1));
      mb     = mb >> d;
    end
    sr = sa;
    if (sa == sb) mr = ma + mb;
    else          mr = ma - mb - 50'(sticky);
    if (mr == '0) return FP_ZERO;
    er = ea;
    if (mr[49]) begin
      er     = er + 1;
      sticky = sticky | mr[0];
      mr     = mr >> 1;
    end
    // leading-zero count below bit 48: the highest set bit wins
    lz = '0;
    for (int i = 0; i <= 48; i++) if (mr[i]) lz = 6'(48 - i);
    mr  = mr << lz;
    er  = er - int'(lz);
    sig = {mr[48:23], (|mr[22:0]) | sticky};
    return fp_pack(sr, er, sig);
  endfunction

  function automatic fp32_t fp_mul(input fp32_t a, input fp32_t b);
    logic        s;
    int          e;
    logic [47:0] p;
    logic [26:0] sig;
    s = a[31] ^ b[31];
    if (a[30:23] == 8'd0 || b[30:23] == 8'd0) return FP_ZERO;
    e = int'(a[30:23]) + int'(b[30:23]) - 127;
    p = {1'b1, a[22:0]} * {1'b1, b[22:0]};
    if (p[47]) begin
      sig = {p[47:22], |p[21:0]};
      e   = e + 1;
    end else begin
      sig = {p[46:21], |p[20:0]};
    end
    return fp_pack(s, e, sig);
  endfunction

  function automatic fp32_t fp_div(input fp32_t a, input fp32_t b);
    logic        s;
    int          e;
    logic [50:0] n, q, rem;
    logic [26:0] sig;
    s = a[31] ^ b[31];
    if (b[30:23] == 8'd0) return {s, FP_INF[30:0]};
    if (a[30:23] == 8'd0) return FP_ZERO;
    e   = int'(a[30:23]) - int'(b[30:23]) + 127;
    n   = {1'b1, a[22:0], 27'd0};
    q   = n / 51'({1'b1, b[22:0]});
    rem = n % 51'({1'b1, b[22:0]});
    // q lies in (2^26, 2^28)
    if (q[27]) begin
      sig = {q[27:2], (|q[1:0]) | (rem != '0)};
    end else begin
      sig = {q[26:1], q[0] | (rem != '0)};
      e   = e - 1;
    end
    return fp_pack(s, e, sig);
  endfunction

  // Square root of |a| (the sign is ignored).
  function automatic fp32_t fp_sqrt(input fp32_t a);
    int          e, ue;
    logic [55:0] m, rem, root, trial;
    logic [26:0] sig;
    if (a[30:23] == 8'd0) return FP_ZERO;
    ue = int'(a[30:23]) - 127;
    m  = 56'({1'b1, a[22:0]});
    // make the unbiased exponent even, then scale so the root has 27 bits
    if (ue % 2 != 0) begin
      m  = m << 1;
      ue = ue - 1;
    end
    m    = m << 29;   // value * 2^52: root = sqrt(value) * 2^26
    rem  = '0;
    root = '0;
    for (int i = 27; i >= 0; i--) begin
      rem   = (rem << 2) | ((m >> (2 * i)) & 56'd3);
      trial = (root << 2) | 56'd1;
      root  = root << 1;
      if (rem >= trial) begin
        rem  = rem - trial;
        root = root | 56'd1;
      end
    end
    e = ue / 2 + 127;
    // root lies in [2^26, 2^27)
    sig = {root[26:1], root[0] | (rem != '0)};
    return fp_pack(1'b0, e, sig);
  endfunction

  // Round-to-nearest integer of a float whose magnitude is below 2^15.
  function automatic int fp_to_int(input fp32_t a);
    int          e;
    logic [47:0] m;
    int          v;
    e = int'(a[30:23]) - 127;
    if (a[30:23] == 8'd0 || e < -1) return 0;
    if (e > 14) e = 14;
    m = 48'({1'b1, a[22:0]}) << (e + 1);   // binary point at bit 24
    v = int'(m[47:24]) + int'(m[23]);
    return a[31] ? -v : v;
  endfunction

  function automatic fp32_t fp_from_int(input int v);
    logic        s;
    logic [31:0] u;
    logic [4:0]  lz;
    if (v == 0) return FP_ZERO;
    s = v < 0;
    u = s ? 32'(-v) : 32'(v);
    lz = '0;
    for (int i = 0; i <= 31; i++) if (u[i]) lz = 5'(31 - i);
    u = u << lz;
    return fp_pack(s, 158 - int'(lz), {u[31:6], |u[5:0]});
  endfunction

  // exp(a) = 2^k * exp(r), k = round(a / ln 2), r = a - k ln 2, |r| <= ln2/2
  function automatic fp32_t fp_exp(input fp32_t a);
    int    k, eo;
    fp32_t r, p;
    if (a[30:0] > 31'h42B1_7217) return a[31] ? FP_ZERO : FP_INF;  // |a| > 88.72
    k = fp_to_int(fp_mul(a, FP_LOG2E));
    r = fp_add(a, fp_mul(fp_from_int(k), FP_LN2), 1'b1);
    // Horner form of sum r^n / n!, n = 0..7
    p = 32'h3950_0D01;                                   // 1/5040
    p = fp_add(fp_mul(p, r), 32'h3AB6_0B61, 1'b0);       // 1/720
    p = fp_add(fp_mul(p, r), 32'h3C08_8889, 1'b0);       // 1/120
    p = fp_add(fp_mul(p, r), 32'h3D2A_AAAB, 1'b0);       // 1/24
    p = fp_add(fp_mul(p, r), 32'h3E2A_AAAB, 1'b0);       // 1/6
    p = fp_add(fp_mul(p, r), 32'h3F00_0000, 1'b0);       // 1/2
    p = fp_add(fp_mul(p, r), FP_ONE, 1'b0);
    p = fp_add(fp_mul(p, r), FP_ONE, 1'b0);
    eo = int'(p[30:23]) + k;
    if (eo <= 0)   return FP_ZERO;
    if (eo >= 255) return FP_INF;
    return {1'b0, 8'(eo), p[22:0]};
  endfunction

endpackage
