// tb_mix_state: drives the mixed state estimation with random states and
// mixing weights for three frames, with the two input streams in different
// orders, and checks each of the 15 output words against the weighted sum
// computed in double precision, the model enable that marks it (6 words of
// model 1, then 9 of model 2), that the words come on consecutive clocks and
// that the first comes 13 clocks after the last input word.
module tb_mix_state;
  import tb_fp_util::*;

  logic clk = 0, rst = 1;
  always #5 clk = ~clk;

  logic [31:0] Xs, mixw, X0;
  logic        en_x, en_w, en_1, en_2;
  int checks = 0, failures = 0;
  int cyc = 0, last_in_cyc, n_out;
  real x[15], w[4];

  mix_state dut (.clk, .rst, .Xs, .clk_enable_Xs(en_x), .mixw, .clk_enable_mixw(en_w),
                 .X0, .clk_enable_X01(en_1), .clk_enable_X02(en_2));

  // cyc counts rising edges; 13 edges of latency read as a difference of 14
  always @(posedge clk) begin
    if (en_x || en_w) last_in_cyc = cyc;
    cyc <= cyc + 1;
  end

  task automatic chk(input string what, input bit ok);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s", what);
    end
  endtask

  always @(posedge clk) if (!rst && (en_1 || en_2)) begin
    real want, scale;
    int  e, j;
    j = (n_out < 6) ? 0 : 1;
    e = (n_out < 6) ? n_out : n_out - 6;
    want  = (e < 6 ? x[e] * w[2*j] : 0.0) + x[6 + e] * w[2*j + 1];
    scale = (e < 6 ? fabs(x[e] * w[2*j]) : 0.0) + fabs(x[6 + e] * w[2*j + 1]);
    chk($sformatf("X0[%0d] = %g want %g", n_out, f2r(X0), want), close(f2r(X0), want, 3.0e-7, scale));
    chk($sformatf("X0[%0d] enable model %0d", n_out, j + 1), (j == 0) ? (en_1 && !en_2) : (en_2 && !en_1));
    chk($sformatf("X0[%0d] timing: %0d cycles", n_out, cyc - last_in_cyc), cyc - last_in_cyc == 14 + n_out);
    n_out++;
  end

  task automatic frame(input int order);
    real p, q;
    for (int i = 0; i < 15; i++) x[i] = f2r(r2f((real'($urandom % 200000) - 100000.0) / 7.0));
    p = real'($urandom % 1000) / 1000.0;
    q = real'($urandom % 1000) / 1000.0;
    w[0] = f2r(r2f(p)); w[1] = f2r(r2f(1.0 - p));
    w[2] = f2r(r2f(q)); w[3] = f2r(r2f(1.0 - q));
    n_out = 0;
    if (order == 0) begin          // weights first
      for (int i = 0; i < 4; i++) begin
        @(negedge clk) en_w = 1; mixw = r2f(w[i]);
      end
      @(negedge clk) en_w = 0;
      for (int i = 0; i < 15; i++) begin
        @(negedge clk) en_x = 1; Xs = r2f(x[i]);
      end
      @(negedge clk) en_x = 0;
    end else begin                 // overlapping streams, states first
      for (int i = 0; i < 15; i++) begin
        @(negedge clk) en_x = 1; Xs = r2f(x[i]);
        en_w = (i >= 11); mixw = r2f(w[i >= 11 ? i - 11 : 0]);
      end
      @(negedge clk) en_x = 0; en_w = 0;
    end
    repeat (40) @(posedge clk);
    chk($sformatf("frame produced %0d outputs", n_out), n_out == 15);
  endtask

  initial begin
    en_x = 0; en_w = 0; Xs = 0; mixw = 0;
    repeat (3) @(posedge clk);
    @(negedge clk) rst = 0;
    frame(0);
    frame(1);
    frame(0);
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
