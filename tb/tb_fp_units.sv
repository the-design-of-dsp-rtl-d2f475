// tb_fp_units: checks the five pipelined single-precision units (multiplier,
// adder/subtractor, divider, square root, exponential) against double-precision
// arithmetic on random operands, and checks that each result leaves its unit
// exactly LAT cycles after the operands went in.
module tb_fp_units;
  import tb_fp_util::*;

  localparam int N = 400;
  logic clk = 0, rst = 1;
  always #5 clk = ~clk;

  logic        iv;
  logic [31:0] a, b;
  logic        sub;
  logic        v_mul, v_add, v_div, v_sqrt, v_exp;
  logic [31:0] y_mul, y_add, y_div, y_sqrt, y_exp;
  int checks = 0, failures = 0;

  fp_mul    u_mul  (.clk, .rst, .in_valid(iv), .a, .b, .out_valid(v_mul), .y(y_mul));
  fp_addsub u_add  (.clk, .rst, .in_valid(iv), .a, .b, .sub, .out_valid(v_add), .y(y_add));
  fp_div    u_div  (.clk, .rst, .in_valid(iv), .a, .b, .out_valid(v_div), .y(y_div));
  fp_sqrt   u_sqrt (.clk, .rst, .in_valid(iv), .a, .out_valid(v_sqrt), .y(y_sqrt));
  fp_exp    u_exp  (.clk, .rst, .in_valid(iv), .a, .out_valid(v_exp), .y(y_exp));

  // operand history, indexed by issue cycle
  real ha[0:N-1], hb[0:N-1];
  bit  hs[0:N-1];
  int  cyc = 0, issue_cyc[0:N-1];
  int  n_mul = 0, n_add = 0, n_div = 0, n_sqrt = 0, n_exp = 0;

  function automatic real rnd(input real lo_exp, input real hi_exp);
    real m, e;
    m = 1.0 + real'($urandom % 1000000) / 1000000.0;
    e = lo_exp + real'($urandom % 1000) / 1000.0 * (hi_exp - lo_exp);
    return (($urandom % 2) ? -1.0 : 1.0) * m * (2.0 ** $floor(e));
  endfunction

  task automatic chk(input string what, input bit ok, input real got, input real want);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL %s got %g want %g", what, got, want);
    end
  endtask

  always @(posedge clk) if (!rst) cyc <= cyc + 1;

  always @(posedge clk) if (!rst) begin
    if (v_mul) begin
      chk("mul", close(f2r(y_mul), ha[n_mul] * hb[n_mul], 1.2e-7), f2r(y_mul), ha[n_mul] * hb[n_mul]);
      chk("mul latency", cyc - issue_cyc[n_mul] == 5, cyc - issue_cyc[n_mul], 5);
      n_mul++;
    end
    if (v_add) begin
      real w;
      w = hs[n_add] ? ha[n_add] - hb[n_add] : ha[n_add] + hb[n_add];
      chk("add", close(f2r(y_add), w, 1.2e-7, fabs(ha[n_add]) + fabs(hb[n_add])), f2r(y_add), w);
      chk("add latency", cyc - issue_cyc[n_add] == 7, cyc - issue_cyc[n_add], 7);
      n_add++;
    end
    if (v_div) begin
      chk("div", close(f2r(y_div), ha[n_div] / hb[n_div], 1.2e-7), f2r(y_div), ha[n_div] / hb[n_div]);
      n_div++;
    end
    if (v_sqrt) begin
      chk("sqrt", close(f2r(y_sqrt), $sqrt(fabs(ha[n_sqrt])), 1.2e-7), f2r(y_sqrt), $sqrt(fabs(ha[n_sqrt])));
      chk("sqrt latency", cyc - issue_cyc[n_sqrt] == 16, cyc - issue_cyc[n_sqrt], 16);
      n_sqrt++;
    end
    if (v_exp) begin
      if (ha[n_exp] > 88.0)
        chk("exp overflow", y_exp == 32'h7F80_0000, f2r(y_exp), $exp(ha[n_exp]));
      else if (ha[n_exp] < -87.0)
        chk("exp underflow", y_exp == 32'h0, f2r(y_exp), $exp(ha[n_exp]));
      else
        chk("exp", close(f2r(y_exp), $exp(ha[n_exp]), 3.0e-6), f2r(y_exp), $exp(ha[n_exp]));
      n_exp++;
    end
  end

  initial begin
    iv = 0; a = 0; b = 0; sub = 0;
    repeat (3) @(posedge clk);
    rst <= 0;
    for (int i = 0; i < N; i++) begin
      real ra, rb;
      @(negedge clk);
      // the exponential needs a moderate argument; the others take any range
      if (i % 2 == 0) begin
        ra = rnd(-3, 6);
        rb = rnd(-20, 20);
      end else begin
        ra = rnd(-20, 20);
        rb = (i % 8 == 1) ? ra * (1.0 + 1.0e-6) : rnd(-20, 20);  // near cancellation
      end
      a = r2f(ra); b = r2f(rb); sub = $urandom % 2;
      ha[i] = f2r(a); hb[i] = f2r(b); hs[i] = sub;
      issue_cyc[i] = cyc;
      iv = 1;
    end
    @(negedge clk) iv = 0;
    repeat (40) @(posedge clk);
    chk("result count", n_mul == N && n_add == N && n_div == N && n_sqrt == N && n_exp == N, n_mul, N);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #200000;
    failures++;
    $display("watchdog timeout");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
