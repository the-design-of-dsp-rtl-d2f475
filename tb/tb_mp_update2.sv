// tb_mp_update2: checks ml = msme / sqrt((2 pi)^3 det S) against double
// precision for random inputs given in both orders, and the latency.
module tb_mp_update2;
  import tb_fp_util::*;

  localparam int LATENCY = 27;
  logic clk = 0, rst = 1;
  always #5 clk = ~clk;

  logic [31:0] msme, rttemp, ml;
  logic        en_m, en_d, en_l;
  int checks = 0, failures = 0, cyc = 0, last_in_cyc, n_out;
  real rm, rd;

  mp_update2 dut (.clk, .rst, .msme, .clk_enable_msme(en_m), .rttemp, .clk_enable_rttemp(en_d),
                  .ml, .clk_enable_ml(en_l));

  always @(posedge clk) begin
    if (en_m || en_d) last_in_cyc = cyc;
    cyc <= cyc + 1;
  end

  task automatic chk(input string what, input bit ok);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s", what);
    end
  endtask

  always @(posedge clk) if (!rst && (en_l)) begin
    real want;
    want = rm / $sqrt((2.0 * 3.14159265358979) ** 3 * rd);
    chk($sformatf("ml %g want %g", f2r(ml), want), close(f2r(ml), want, 5.0e-7));
    chk($sformatf("latency %0d", cyc - last_in_cyc - 1), cyc - last_in_cyc - 1 == LATENCY);
    n_out++;
  end

  initial begin
    en_m = 0; en_d = 0; msme = 0; rttemp = 0;
    repeat (3) @(posedge clk);
    @(negedge clk) rst = 0;
    for (int t = 0; t < 20; t++) begin
      rm = f2r(r2f(real'($urandom % 100000 + 1) / 100000.0));
      rd = f2r(r2f(real'($urandom % 100000 + 1) * $pow(2.0, real'(int'($urandom % 20) - 10))));
      n_out = 0;
      if (t % 3 == 0) begin
        @(negedge clk) en_m = 1; en_d = 1; msme = r2f(rm); rttemp = r2f(rd);
      end else if (t % 3 == 1) begin
        @(negedge clk) en_m = 1; msme = r2f(rm);
        @(negedge clk) en_m = 0; en_d = 1; rttemp = r2f(rd);
      end else begin
        @(negedge clk) en_d = 1; rttemp = r2f(rd);
        @(negedge clk) en_d = 0; en_m = 1; msme = r2f(rm);
      end
      @(negedge clk) en_m = 0; en_d = 0;
      repeat (LATENCY + 5) @(posedge clk);
      chk("one result per run", n_out == 1);
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
