// tb_mp_update1: feeds model probability update module 1 with random
// residuals and random symmetric positive-definite inverse covariances and
// checks msme = exp(-v' Sinv v / 2) against double precision, and the latency
// from the last input word to the result.
module tb_mp_update1;
  import tb_fp_util::*;

  localparam int LATENCY = 59;   // edges from last input to msme valid
  logic clk = 0, rst = 1;
  always #5 clk = ~clk;

  logic [31:0] Zk, R12temp, msme;
  logic        en_zk, en_r, en_m;
  int checks = 0, failures = 0, cyc = 0, last_in_cyc, n_out;
  real v[3], si[9];

  mp_update1 dut (.clk, .rst, .Zk, .clk_enable_Zk(en_zk), .R12temp, .clk_enable_R12temp(en_r),
                  .msme, .clk_enable_msme(en_m));

  always @(posedge clk) begin
    if (en_zk || en_r) last_in_cyc = cyc;
    cyc <= cyc + 1;
  end

  task automatic chk(input string what, input bit ok);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s", what);
    end
  endtask

  always @(posedge clk) if (!rst && (en_m)) begin
    real q, want;
    q = 0.0;
    for (int i = 0; i < 3; i++)
      for (int j = 0; j < 3; j++) q += v[i] * si[3 * i + j] * v[j];
    want = $exp(-0.5 * q);
    chk($sformatf("msme %g want %g (q=%g)", f2r(msme), want, q), close(f2r(msme), want, 2.0e-5));
    chk($sformatf("latency %0d", cyc - last_in_cyc - 1), cyc - last_in_cyc - 1 == LATENCY);
    n_out++;
  end

  task automatic run(input int order, input real scale);
    real a[9];
    for (int i = 0; i < 3; i++) v[i] = f2r(r2f(scale * (real'($urandom % 2000) - 1000.0) / 1000.0));
    for (int i = 0; i < 9; i++) a[i] = (real'($urandom % 2000) - 1000.0) / 1000.0;
    // Sinv = A A' + 0.5 I, symmetric positive definite
    for (int i = 0; i < 3; i++)
      for (int j = 0; j < 3; j++) begin
        real t;
        t = (i == j) ? 0.5 : 0.0;
        for (int k = 0; k < 3; k++) t += a[3 * i + k] * a[3 * j + k];
        si[3 * i + j] = f2r(r2f(t));
      end
    n_out = 0;
    if (order == 0) begin
      for (int i = 0; i < 3; i++) begin @(negedge clk) en_zk = 1; Zk = r2f(v[i]); end
      @(negedge clk) en_zk = 0;
      for (int i = 0; i < 9; i++) begin @(negedge clk) en_r = 1; R12temp = r2f(si[i]); end
      @(negedge clk) en_r = 0;
    end else begin
      for (int i = 0; i < 9; i++) begin
        @(negedge clk) en_r = 1; R12temp = r2f(si[i]);
        en_zk = (i < 3); Zk = r2f(v[i % 3]);
      end
      @(negedge clk) en_r = 0; en_zk = 0;
    end
    repeat (LATENCY + 10) @(posedge clk);
    chk("one result per run", n_out == 1);
  endtask

  initial begin
    en_zk = 0; en_r = 0; Zk = 0; R12temp = 0;
    repeat (3) @(posedge clk);
    @(negedge clk) rst = 0;
    for (int t = 0; t < 12; t++) run(t % 2, (t < 6) ? 1.0 : 3.0);
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
