// tb_mat_inv3: sends random symmetric positive definite 3x3 matrices (of
// the form A A' + I, as a residual covariance is) and some general ones to
// the inverse module,
// and checks the determinant and every element of the inverse against
// values worked out in double precision, that the 9 inverse words come on
// consecutive clocks, and the latencies: det 41 clocks and the first
// inverse word 54 clocks after the edge that took the last input word.
module tb_mat_inv3;
  import tb_fp_util::*;

  localparam int LAT_DET  = 41;
  localparam int LAT_SINV = 54;
  localparam int N_MAT    = 8;
  logic clk = 0, rst = 1;
  always #5 clk = ~clk;

  logic [31:0] S, Sinv, det;
  logic        en_s, en_i, en_d;
  int checks = 0, failures = 0;
  int cyc = 0, last_in, n_i, n_d;
  real sm[9], inv[9], dt, nrm;

  mat_inv3 dut (.clk, .rst, .S, .clk_enable_S(en_s), .Sinv, .clk_enable_Sinv(en_i),
                .det, .clk_enable_det(en_d));

  always @(posedge clk) begin
    if (en_s) last_in = cyc;
    cyc <= cyc + 1;
  end

  task automatic chk(input string what, input bit ok);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s", what);
    end
  endtask

  always @(posedge clk) if (!rst && (en_d || en_i)) begin
    if (en_d) begin
      chk($sformatf("det %g want %g", f2r(det), dt), close(f2r(det), dt, 2.0e-6));
      chk($sformatf("det latency %0d", cyc - last_in - 1), cyc - last_in - 1 == LAT_DET);
      n_d++;
    end
    if (en_i) begin
      chk($sformatf("Sinv[%0d] %g want %g", n_i, f2r(Sinv), inv[n_i]),
          close(f2r(Sinv), inv[n_i], 1.0e-5, nrm));
      chk($sformatf("Sinv[%0d] latency %0d", n_i, cyc - last_in - 1), cyc - last_in - 1 == LAT_SINV + n_i);
      n_i++;
    end
  end

  // sym = 0 gives a general matrix A + 4 I, which the element order of the
  // inverse must also get right
  task automatic one_matrix(input bit sym);
    real a[9];
    for (int i = 0; i < 9; i++) a[i] = (real'($urandom % 2000) - 1000.0) / 500.0;
    for (int r = 0; r < 3; r++)
      for (int q = 0; q < 3; q++) begin
        real t;
        t = (r == q) ? (sym ? 1.0 : 4.0) : 0.0;
        if (sym) for (int x = 0; x < 3; x++) t += a[3 * r + x] * a[3 * q + x];
        else     t += a[3 * r + q];
        sm[3 * r + q] = f2r(r2f(t));
      end
    dt = sm[0] * (sm[4] * sm[8] - sm[5] * sm[7]) - sm[1] * (sm[3] * sm[8] - sm[5] * sm[6])
       + sm[2] * (sm[3] * sm[7] - sm[4] * sm[6]);
    inv[0] = (sm[4] * sm[8] - sm[5] * sm[7]) / dt;
    inv[1] = (sm[2] * sm[7] - sm[1] * sm[8]) / dt;
    inv[2] = (sm[1] * sm[5] - sm[2] * sm[4]) / dt;
    inv[3] = (sm[5] * sm[6] - sm[3] * sm[8]) / dt;
    inv[4] = (sm[0] * sm[8] - sm[2] * sm[6]) / dt;
    inv[5] = (sm[2] * sm[3] - sm[0] * sm[5]) / dt;
    inv[6] = (sm[3] * sm[7] - sm[4] * sm[6]) / dt;
    inv[7] = (sm[1] * sm[6] - sm[0] * sm[7]) / dt;
    inv[8] = (sm[0] * sm[4] - sm[1] * sm[3]) / dt;
    nrm = 0.0;
    for (int i = 0; i < 9; i++) nrm = (fabs(inv[i]) > nrm) ? fabs(inv[i]) : nrm;
    n_i = 0; n_d = 0;
    for (int i = 0; i < 9; i++) begin
      @(negedge clk) en_s = 1; S = r2f(sm[i]);
    end
    @(negedge clk) en_s = 0;
    repeat (80) @(posedge clk);
    chk($sformatf("outputs det %0d inverse %0d", n_d, n_i), n_d == 1 && n_i == 9);
  endtask

  initial begin
    en_s = 0; S = 0;
    repeat (3) @(posedge clk);
    @(negedge clk) rst = 0;
    for (int t = 0; t < N_MAT; t++) one_matrix(t % 4 != 3);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("watchdog timeout");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
