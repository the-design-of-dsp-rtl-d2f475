// tb_residual: drives the residual module for three frames with random
// converted measurements, measurement covariances, predicted states of both
// models and predicted covariance blocks, in different stream orders, and
// checks every v and S word against Z - H x and H P H' + R worked out in
// double precision, the word counts per model and the latency of 8 clocks
// from the edge that completed a model's inputs to its first output word.
module tb_residual;
  import tb_fp_util::*;

  localparam int LATENCY = 8;
  logic clk = 0, rst = 1;
  always #5 clk = ~clk;

  logic [31:0] Z, R, Xp, Pp, v, S;
  logic        en_z, en_r, en_x1, en_x2, en_p, en_v, en_s;
  int checks = 0, failures = 0;
  int cyc = 0, last_in, n_v, n_s, j_v, j_s;
  real z[3], rr[9], x[2][9], p[2][9];

  residual dut (.clk, .rst, .Z, .clk_enable_Z(en_z), .R, .clk_enable_R(en_r), .Xp,
                .clk_enable_Xp1(en_x1), .clk_enable_Xp2(en_x2), .Pp, .clk_enable_Pp(en_p),
                .v, .clk_enable_v(en_v), .S, .clk_enable_S(en_s));

  always @(posedge clk) begin
    if (en_z || en_r || en_x1 || en_x2 || en_p) last_in = cyc;
    cyc <= cyc + 1;
  end

  task automatic chk(input string what, input bit ok);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s", what);
    end
  endtask

  always @(posedge clk) if (!rst && (en_v || en_s)) begin
    if (en_v) begin
      real want;
      want = z[n_v % 3] - x[j_v % 2][n_v % 3];
      chk($sformatf("v[%0d][%0d] %g want %g", j_v, n_v % 3, f2r(v), want),
          close(f2r(v), want, 3.0e-7, fabs(z[n_v % 3]) + fabs(x[j_v % 2][n_v % 3])));
      if (n_v % 3 == 0) chk($sformatf("v latency %0d", cyc - last_in - 1), cyc - last_in - 1 == LATENCY);
      n_v++;
      if (n_v % 3 == 0) j_v++;
    end
    if (en_s) begin
      real want;
      want = p[j_s % 2][n_s % 9] + rr[n_s % 9];
      chk($sformatf("S[%0d][%0d] %g want %g", j_s, n_s % 9, f2r(S), want),
          close(f2r(S), want, 3.0e-7, fabs(p[j_s % 2][n_s % 9]) + fabs(rr[n_s % 9])));
      n_s++;
      if (n_s % 9 == 0) j_s++;
    end
  end

  function automatic real rnd();
    return f2r(r2f((real'($urandom % 200000) - 100000.0) / 13.0));
  endfunction

  task automatic send_x(input int j);
    for (int i = 0; i < (j == 0 ? 6 : 9); i++) begin
      @(negedge clk) en_x1 = (j == 0); en_x2 = (j == 1); Xp = r2f(x[j][i]);
    end
    @(negedge clk) en_x1 = 0; en_x2 = 0;
  endtask

  task automatic send_p(input int j);
    for (int i = 0; i < 9; i++) begin
      @(negedge clk) en_p = 1; Pp = r2f(p[j][i]);
    end
    @(negedge clk) en_p = 0;
  endtask

  task automatic send_zr();
    for (int i = 0; i < 9; i++) begin
      @(negedge clk) en_r = 1; R = r2f(rr[i]);
      en_z = (i < 3); Z = r2f(z[i % 3]);
    end
    @(negedge clk) en_r = 0; en_z = 0;
  endtask

  task automatic frame(input int order);
    int v0, s0;
    for (int i = 0; i < 3; i++) z[i] = rnd();
    for (int i = 0; i < 9; i++) rr[i] = rnd();
    for (int j = 0; j < 2; j++)
      for (int i = 0; i < 9; i++) begin
        x[j][i] = rnd();
        p[j][i] = rnd();
      end
    v0 = n_v; s0 = n_s;
    if (order == 0) begin          // measurement first, then each model
      send_zr();
      send_x(0); send_x(1);
      send_p(0);
      repeat (12) @(posedge clk);
      send_p(1);
    end else begin                 // states and model 1 block first
      send_x(0); send_p(0); send_x(1);
      repeat (5) @(posedge clk);
      send_zr();
      repeat (12) @(posedge clk);
      send_p(1);
    end
    repeat (30) @(posedge clk);
    chk($sformatf("frame words v %0d S %0d", n_v - v0, n_s - s0), n_v - v0 == 6 && n_s - s0 == 18);
  endtask

  initial begin
    en_z = 0; en_r = 0; en_x1 = 0; en_x2 = 0; en_p = 0; Z = 0; R = 0; Xp = 0; Pp = 0;
    n_v = 0; n_s = 0; j_v = 0; j_s = 0;
    repeat (3) @(posedge clk);
    @(negedge clk) rst = 0;
    frame(0);
    frame(1);
    frame(0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3000) @(posedge clk);
    failures++;
    $display("watchdog timeout");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
