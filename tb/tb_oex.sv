// tb_oex: drives the state interaction output module with random model
// states and probabilities for three frames, with the two input streams in
// different orders, and checks every output word against the weighted sum
// computed in double precision, that the 9 outputs come on consecutive
// clocks, and that the first comes 13 clocks after the last input word.
module tb_oex;
  import tb_fp_util::*;

  logic clk = 0, rst = 1;
  always #5 clk = ~clk;

  logic [31:0] Mp, Usx, Oex;
  logic        en_mp, en_usx, en_oex;
  int checks = 0, failures = 0;
  int cyc = 0, last_in_cyc, n_out;
  real usx[15], mp[2];

  oex dut (.clk, .rst, .Mp, .clk_enable_Mp(en_mp), .Usx, .clk_enable_Usx(en_usx),
           .Oex, .clk_enable_Oex(en_oex));

  // cyc counts rising edges; an output visible after edge n is sampled at
  // edge n + 1, so 13 edges of latency read as a difference of 14
  always @(posedge clk) begin
    if (en_usx || en_mp) last_in_cyc = cyc;
    cyc <= cyc + 1;
  end

  task automatic chk(input string what, input bit ok);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s", what);
    end
  endtask

  always @(posedge clk) if (!rst && (en_oex)) begin
    real want;
    want = (n_out < 6 ? usx[n_out] * mp[0] : 0.0) + usx[6 + n_out] * mp[1];
    chk($sformatf("Oex[%0d] = %g want %g", n_out, f2r(Oex), want),
        close(f2r(Oex), want, 3.0e-7, fabs(usx[6 + n_out] * mp[1]) + (n_out < 6 ? fabs(usx[n_out] * mp[0]) : 0.0)));
    chk($sformatf("Oex[%0d] timing: %0d cycles", n_out, cyc - last_in_cyc), cyc - last_in_cyc == 14 + n_out);
    n_out++;
  end

  task automatic frame(input int order);
    real p;
    for (int i = 0; i < 15; i++) usx[i] = f2r(r2f((real'($urandom % 200000) - 100000.0) / 7.0));
    p = real'($urandom % 1000) / 1000.0;
    mp[0] = f2r(r2f(p));
    mp[1] = f2r(r2f(1.0 - p));
    n_out = 0;
    if (order == 0) begin          // probabilities first
      for (int i = 0; i < 2; i++) begin
        @(negedge clk) en_mp = 1; Mp = r2f(mp[i]);
      end
      @(negedge clk) en_mp = 0;
      for (int i = 0; i < 15; i++) begin
        @(negedge clk) en_usx = 1; Usx = r2f(usx[i]);
      end
      @(negedge clk) en_usx = 0;
    end else begin                 // overlapping streams, states first
      for (int i = 0; i < 15; i++) begin
        @(negedge clk) en_usx = 1; Usx = r2f(usx[i]);
        en_mp = (i >= 13); Mp = r2f(mp[i >= 13 ? i - 13 : 0]);
      end
      @(negedge clk) en_usx = 0; en_mp = 0;
    end
    repeat (30) @(posedge clk);
    chk($sformatf("frame produced %0d outputs", n_out), n_out == 9);
  endtask

  initial begin
    en_mp = 0; en_usx = 0; Mp = 0; Usx = 0;
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
