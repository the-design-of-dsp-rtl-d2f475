// tb_mp_predict: loads a transition matrix, then runs several frames of
// model probabilities (P stays loaded between frames, and is reloaded once)
// and checks the predicted probabilities Cbar_j and the four mixing weights
// against double precision, plus the latency of the first Cbar.
module tb_mp_predict;
  import tb_fp_util::*;

  localparam int LATENCY = 13;
  logic clk = 0, rst = 1;
  always #5 clk = ~clk;

  logic [31:0] u, ptrans, pmp, mixw;
  logic        en_u, en_p, en_pmp, en_mix;
  int checks = 0, failures = 0, cyc = 0, last_in_cyc, n_pmp, n_mix;
  real P[4], U[2];

  mp_predict dut (.clk, .rst, .u, .clk_enable_u(en_u), .ptrans, .clk_enable_ptrans(en_p),
                  .pmp, .clk_enable_pmp(en_pmp), .mixw, .clk_enable_mixw(en_mix));

  always @(posedge clk) begin
    if (en_u) last_in_cyc = cyc;
    cyc <= cyc + 1;
  end

  task automatic chk(input string what, input bit ok);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s", what);
    end
  endtask

  function automatic real cbar(input int j);
    return P[j] * U[0] + P[2 + j] * U[1];
  endfunction

  always @(posedge clk) if (!rst) begin
    if (en_pmp) begin
      chk($sformatf("pmp[%0d] %g want %g", n_pmp, f2r(pmp), cbar(n_pmp)), close(f2r(pmp), cbar(n_pmp), 3.0e-7));
      chk($sformatf("pmp latency %0d", cyc - last_in_cyc - 1), cyc - last_in_cyc - 1 == LATENCY + n_pmp);
      n_pmp++;
    end
    if (en_mix) begin
      int i, j;
      real want;
      j = n_mix / 2; i = n_mix % 2;
      want = P[2 * i + j] * U[i] / cbar(j);
      chk($sformatf("mixw[%0d|%0d] %g want %g", i, j, f2r(mixw), want), close(f2r(mixw), want, 5.0e-7));
      n_mix++;
    end
  end

  task automatic load_p(input real stay1, input real stay2);
    P[0] = f2r(r2f(stay1)); P[1] = f2r(r2f(1.0 - stay1));
    P[2] = f2r(r2f(1.0 - stay2)); P[3] = f2r(r2f(stay2));
    for (int k = 0; k < 4; k++) begin @(negedge clk) en_p = 1; ptrans = r2f(P[k]); end
    @(negedge clk) en_p = 0;
  endtask

  initial begin
    en_u = 0; en_p = 0; u = 0; ptrans = 0;
    repeat (3) @(posedge clk);
    @(negedge clk) rst = 0;
    load_p(0.99, 0.99);
    for (int t = 0; t < 10; t++) begin
      real a;
      if (t == 5) load_p(0.9, 0.8);
      a = real'($urandom % 999 + 1) / 1000.0;
      U[0] = f2r(r2f(a)); U[1] = f2r(r2f(1.0 - a));
      n_pmp = 0; n_mix = 0;
      for (int k = 0; k < 2; k++) begin @(negedge clk) en_u = 1; u = r2f(U[k]); end
      @(negedge clk) en_u = 0;
      repeat (40) @(posedge clk);
      chk("two predictions", n_pmp == 2);
      chk("four mixing weights", n_mix == 4);
    end
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
