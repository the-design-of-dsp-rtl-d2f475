// tb_state_predict: drives the one-step state prediction with random start
// states of both models for three frames (words back to back as the mixed
// state estimation sends them, and with gaps), and checks each predicted
// word against F_1 x or F_2 x worked out in double precision with
// T = 0.01 s, the model enable that marks it, that a model's words come on
// consecutive clocks and that its first word comes 20 clocks after the
// model's last input word.
module tb_state_predict;
  import tb_fp_util::*;

  localparam int LATENCY = 20;
  logic clk = 0, rst = 1;
  always #5 clk = ~clk;

  logic [31:0] X0, Xp;
  logic        en1, en2, o1, o2;
  int checks = 0, failures = 0;
  int cyc = 0, last1, last2, n1, n2;
  real x1[6], x2[9], t, h;

  state_predict dut (.clk, .rst, .X0, .clk_enable_X01(en1), .clk_enable_X02(en2),
                     .Xp, .clk_enable_Xp1(o1), .clk_enable_Xp2(o2));

  always @(posedge clk) begin
    if (en1) last1 = cyc;
    if (en2) last2 = cyc;
    cyc <= cyc + 1;
  end

  task automatic chk(input string what, input bit ok);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s", what);
    end
  endtask

  always @(posedge clk) if (!rst && (o1 || o2)) begin
    real want, scale;
    chk("only one model enable", !(o1 && o2));
    if (o1) begin
      want  = x1[n1] + (n1 < 3 ? t * x1[n1 + 3] : 0.0);
      scale = fabs(x1[n1]) + (n1 < 3 ? fabs(t * x1[n1 + 3]) : 0.0);
      chk($sformatf("CV Xp[%0d] %g want %g", n1, f2r(Xp), want), close(f2r(Xp), want, 3.0e-7, scale));
      chk($sformatf("CV Xp[%0d] latency %0d", n1, cyc - last1 - 1), cyc - last1 - 1 == LATENCY + n1);
      n1++;
    end else begin
      want  = x2[n2] + (n2 < 6 ? t * x2[n2 + 3] : 0.0) + (n2 < 3 ? h * x2[n2 + 6] : 0.0);
      scale = fabs(x2[n2]) + (n2 < 6 ? fabs(t * x2[n2 + 3]) : 0.0) + (n2 < 3 ? fabs(h * x2[n2 + 6]) : 0.0);
      chk($sformatf("CA Xp[%0d] %g want %g", n2, f2r(Xp), want), close(f2r(Xp), want, 3.0e-7, scale));
      chk($sformatf("CA Xp[%0d] latency %0d", n2, cyc - last2 - 1), cyc - last2 - 1 == LATENCY + n2);
      n2++;
    end
  end

  task automatic frame(input int gap);
    for (int i = 0; i < 6; i++) x1[i] = f2r(r2f((real'($urandom % 200000) - 100000.0) / 7.0));
    for (int i = 0; i < 9; i++) x2[i] = f2r(r2f((real'($urandom % 200000) - 100000.0) / 7.0));
    n1 = 0; n2 = 0;
    for (int i = 0; i < 6; i++) begin
      @(negedge clk) en1 = 1; X0 = r2f(x1[i]);
    end
    @(negedge clk) en1 = 0;
    repeat (gap) @(negedge clk);
    for (int i = 0; i < 9; i++) begin
      if (i != 0 || gap == 0) @(negedge clk);
      en2 = 1; X0 = r2f(x2[i]);
    end
    @(negedge clk) en2 = 0;
    repeat (60) @(posedge clk);
    chk($sformatf("frame outputs %0d/%0d", n1, n2), n1 == 6 && n2 == 9);
  endtask

  initial begin
    t = f2r(32'h3C23_D70A);
    h = t * t / 2.0;
    en1 = 0; en2 = 0; X0 = 0;
    repeat (3) @(posedge clk);
    @(negedge clk) rst = 0;
    frame(0);
    frame(30);
    frame(3);
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
