// tb_mp_update3: checks the normalised model probabilities
// mp_j = ml_j pmp_j / sum_k ml_k pmp_k against double precision, that the two
// results come on consecutive clocks with both output enables high, and the
// latency from the last input word.
module tb_mp_update3;
  import tb_fp_util::*;

  localparam int LATENCY = 19;
  logic clk = 0, rst = 1;
  always #5 clk = ~clk;

  logic [31:0] ml, pmp, mp;
  logic        en_l, en_p, en_oex, en_fifo;
  int checks = 0, failures = 0, cyc = 0, last_in_cyc, n_out;
  real rl[2], rp[2];

  mp_update3 dut (.clk, .rst, .ml, .clk_enable_ml(en_l), .pmp, .clk_enable_pmp(en_p),
                  .mp, .clk_enable_mp_to_oex(en_oex), .clk_enable_mp_to_fifo(en_fifo));

  always @(posedge clk) begin
    if (en_l || en_p) last_in_cyc = cyc;
    cyc <= cyc + 1;
  end

  task automatic chk(input string what, input bit ok);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s", what);
    end
  endtask

  always @(posedge clk) if (!rst && (en_oex || en_fifo)) begin
    real want;
    want = rl[n_out] * rp[n_out] / (rl[0] * rp[0] + rl[1] * rp[1]);
    chk($sformatf("mp[%0d] %g want %g", n_out, f2r(mp), want), close(f2r(mp), want, 5.0e-7));
    chk("both enables", en_oex && en_fifo);
    chk($sformatf("latency %0d", cyc - last_in_cyc - 1), cyc - last_in_cyc - 1 == LATENCY + n_out);
    n_out++;
  end

  initial begin
    en_l = 0; en_p = 0; ml = 0; pmp = 0;
    repeat (3) @(posedge clk);
    @(negedge clk) rst = 0;
    for (int t = 0; t < 20; t++) begin
      for (int j = 0; j < 2; j++) begin
        rl[j] = f2r(r2f(real'($urandom % 100000 + 1) * $pow(2.0, real'(int'($urandom % 30) - 25))));
        rp[j] = f2r(r2f(real'($urandom % 1000 + 1) / 1000.0));
      end
      n_out = 0;
      if (t % 2 == 0) begin
        for (int j = 0; j < 2; j++) begin
          @(negedge clk) en_l = 1; en_p = 1; ml = r2f(rl[j]); pmp = r2f(rp[j]);
        end
      end else begin
        for (int j = 0; j < 2; j++) begin @(negedge clk) en_p = 1; pmp = r2f(rp[j]); end
        @(negedge clk) en_p = 0;
        for (int j = 0; j < 2; j++) begin @(negedge clk) en_l = 1; ml = r2f(rl[j]); end
      end
      @(negedge clk) en_l = 0; en_p = 0;
      repeat (LATENCY + 6) @(posedge clk);
      chk("two results per run", n_out == 2);
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
