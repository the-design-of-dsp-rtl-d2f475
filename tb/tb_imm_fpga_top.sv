// tb_imm_fpga_top: end-to-end test of the co-processor at its default sizes.
//
// The DSP side is the bus model dsp_emif_bfm; the blocks outside the
// co-processor (coordinate conversion, the two model-conditioned Kalman
// filters) are stood in for by this testbench, which produces their output
// streams from random data. Three frames are run:
//   frame 1  initial values: transition matrix, initial state (15 words),
//            initial covariance (117 words), initial model probabilities
//            (0.5, 0.5) and one measurement are written over the bus and must
//            come out of the selectors and of the prediction module;
//   frames 2 and 3  loop values: a control write starts the frame and the
//            FIFOs must hand back what the previous frame stored.
// In each frame the stand-in blocks deliver the converted measurement (near
// the predicted position) and its covariance, then per model the predicted
// covariance block (from which the co-processor forms S, its inverse and
// determinant), then the updated states
// and covariances. The mixed start states of both models are checked against
// the state words and mixing weights that entered the frame, and the
// predicted states against F_1 and F_2 (T = 10 ms) applied to them. The DSP waits for the interrupt, checks the status byte
// and reads the 9 combined-state words back over the bus (frame 3 is not
// read; a control write must clear its interrupt). Every value is
// compared with a double-precision model of the IMM equations. The
// mechanisms exercised (word writes, control writes, initial and loop
// selection, FIFO drain, interrupt raise and clear, result read-back,
// status read) are counted and each must happen.
module tb_imm_fpga_top;
  import tb_fp_util::*;

  localparam int N_COV = 36 + 81;
  logic clk = 0, rst = 1;
  always #20 clk = ~clk;   // 25 MHz, the clock of the original board

  // bus
  logic       ce_n, aoe_n, awe_n, are_n, d_oe;
  logic [7:0] a, d_bus, d_out;
  logic [4:0] int_n;
  // stand-in filter streams
  logic [31:0] meas_word, state_in, cov_in, pmp, mixw, oex_word, x0;
  logic        meas_valid, state_in_valid, cov_in_valid, pmp_valid, mixw_valid, oex_valid;
  logic        x0_valid_cv, x0_valid_ca;
  logic [31:0] xp;
  logic        xp_valid_cv, xp_valid_ca;
  logic [31:0] upd_state, upd_cov, zc, rcov, ppos, s_cov, sinv;
  logic        upd_state_valid, upd_cov_valid, zc_valid, rcov_valid, ppos_valid, s_cov_valid;
  logic        sinv_valid;

  dsp_emif_bfm bfm (.clk, .ce_n, .aoe_n, .awe_n, .are_n, .a, .d(d_bus), .d_from_fpga(d_out), .d_oe);

  imm_fpga_top dut (
    .clk, .rst, .ce_n, .aoe_n, .awe_n, .are_n, .a, .d_in(d_bus), .d_out, .d_oe, .int_n,
    .meas_word, .meas_valid, .state_in, .state_in_valid, .cov_in, .cov_in_valid,
    .pmp, .pmp_valid, .mixw, .mixw_valid, .x0, .x0_valid_cv, .x0_valid_ca, .xp, .xp_valid_cv, .xp_valid_ca,
    .upd_state, .upd_state_valid, .upd_cov, .upd_cov_valid,
    .zc, .zc_valid, .rcov, .rcov_valid, .ppos, .ppos_valid, .s_cov, .s_cov_valid, .sinv, .sinv_valid,
    .oex_word, .oex_valid
  );

  int checks = 0, failures = 0;
  task automatic chk(input string what, input bit ok);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s", what);
    end
  endtask

  // expected streams
  logic [31:0] exp_state[$], exp_cov[$], exp_meas[$];
  real         exp_pmp[$], exp_mixw[$], exp_oex[$];
  int n_state_init = 0, n_state_loop = 0, n_cov_init = 0, n_cov_loop = 0, n_meas = 0;
  int n_pmp = 0, n_mixw = 0, n_oex = 0, n_irq_raise = 0, n_irq_clear = 0;
  int n_word_wr = 0, n_ctrl_wr = 0, n_readback = 0, n_status = 0, n_drain = 0;
  logic int_q = 1;
  real  xin[15], win[4];
  int   n_xin = 0, n_win = 0, n_x0 = 0, n_xp = 0;
  real  x0r[15], xpr[15], pp_r[2][9], rc_r[9];
  int   n_s = 0, n_si = 0;
  real  T_S = 0.009999999776482582;   // 0.01 s as a single-precision word

  always @(posedge clk) if (!rst) begin
    if (state_in_valid) begin
      chk("unexpected state word", exp_state.size() != 0);
      if (exp_state.size() != 0) chk($sformatf("state_in %h", state_in), state_in == exp_state.pop_front());
      if (dut.sel_loop) n_state_loop++; else n_state_init++;
    end
    if (cov_in_valid) begin
      chk("unexpected covariance word", exp_cov.size() != 0);
      if (exp_cov.size() != 0) chk($sformatf("cov_in %h", cov_in), cov_in == exp_cov.pop_front());
      if (dut.sel_loop) n_cov_loop++; else n_cov_init++;
    end
    if (meas_valid) begin
      chk("unexpected measurement word", exp_meas.size() != 0);
      if (exp_meas.size() != 0) chk($sformatf("meas %h", meas_word), meas_word == exp_meas.pop_front());
      n_meas++;
    end
    if (pmp_valid) begin
      chk("unexpected pmp", exp_pmp.size() != 0);
      if (exp_pmp.size() != 0) begin
        real w;
        w = exp_pmp.pop_front();
        chk($sformatf("pmp %g want %g", f2r(pmp), w), close(f2r(pmp), w, 1.0e-6));
      end
      n_pmp++;
    end
    if (mixw_valid) begin
      chk("unexpected mixw", exp_mixw.size() != 0);
      if (exp_mixw.size() != 0) begin
        real w;
        w = exp_mixw.pop_front();
        chk($sformatf("mixw %g want %g", f2r(mixw), w), close(f2r(mixw), w, 1.0e-6));
      end
      n_mixw++;
    end
    if (x0_valid_cv || x0_valid_ca) begin
      int  k, j, e;
      real want, scale;
      k = n_x0 % 15;
      j = (k < 6) ? 0 : 1;
      e = (k < 6) ? k : k - 6;
      want  = (e < 6 ? xin[e] * win[2*j] : 0.0) + xin[6 + e] * win[2*j + 1];
      scale = (e < 6 ? fabs(xin[e] * win[2*j]) : 0.0) + fabs(xin[6 + e] * win[2*j + 1]);
      chk($sformatf("x0[%0d] %g want %g", k, f2r(x0), want), close(f2r(x0), want, 3.0e-7, scale));
      chk($sformatf("x0[%0d] model enable", k), j == 0 ? !x0_valid_ca : !x0_valid_cv);
      x0r[k] = f2r(x0);
      n_x0++;
    end
    if (xp_valid_cv || xp_valid_ca) begin
      int  k, e;
      real want, scale, hh;
      k  = n_xp % 15;
      hh = T_S * T_S / 2.0;
      if (k < 6) begin
        e     = k;
        want  = x0r[e] + (e < 3 ? T_S * x0r[e + 3] : 0.0);
        scale = fabs(x0r[e]) + (e < 3 ? fabs(T_S * x0r[e + 3]) : 0.0);
      end else begin
        e     = k - 6;
        want  = x0r[6 + e] + (e < 6 ? T_S * x0r[9 + e] : 0.0) + (e < 3 ? hh * x0r[12 + e] : 0.0);
        scale = fabs(x0r[6 + e]) + (e < 6 ? fabs(T_S * x0r[9 + e]) : 0.0) + (e < 3 ? fabs(hh * x0r[12 + e]) : 0.0);
      end
      chk($sformatf("xp[%0d] %g want %g", k, f2r(xp), want), close(f2r(xp), want, 3.0e-7, scale));
      chk($sformatf("xp[%0d] model enable", k), k < 6 ? !xp_valid_ca : !xp_valid_cv);
      xpr[k] = f2r(xp);
      n_xp++;
    end
    if (s_cov_valid) begin
      int k, j;
      k = n_s % 9;
      j = (n_s / 9) % 2;
      chk($sformatf("S[%0d][%0d] %g want %g", j, k, f2r(s_cov), pp_r[j][k] + rc_r[k]),
          close(f2r(s_cov), pp_r[j][k] + rc_r[k], 3.0e-7, fabs(pp_r[j][k]) + fabs(rc_r[k])));
      n_s++;
    end
    if (sinv_valid) begin
      int k, j;
      k = n_si % 9;
      j = (n_si / 9) % 2;
      chk($sformatf("Sinv[%0d][%0d] %g want %g", j, k, f2r(sinv), si[j][k]),
          close(f2r(sinv), si[j][k], 1.0e-5, si_max[j]));
      n_si++;
    end
    if (state_in_valid) begin
      xin[n_xin % 15] = f2r(state_in);
      n_xin++;
    end
    if (mixw_valid) begin
      win[n_win % 4] = f2r(mixw);
      n_win++;
    end
    if (oex_valid) n_oex++;
    if (dut.u_fifo_state.rd_en && !dut.u_fifo_state.empty) n_drain++;
    if (!rst && int_q && !int_n[0]) n_irq_raise++;
    if (!rst && !int_q && int_n[0]) n_irq_clear++;
    int_q <= int_n[0];
  end

  // ------------------------------------------------------ reference model
  real P[4];          // P11 P12 P21 P22
  real u_prev[2];     // model probabilities of the previous frame

  // stand-in filter outputs of one frame, and the resulting reference
  real v[2][3], si[2][9], si_max[2], det[2], usx[15], z[3];
  real mp_new[2];

  task automatic make_frame_data();
    real cb[2], lam[2], q, c;
    // converted measurement close to the predicted positions; the residuals
    // are rounded to single precision as the subtractor rounds them
    for (int i = 0; i < 3; i++) begin
      z[i] = f2r(r2f(xpr[i] + (real'($urandom % 2000) - 1000.0) / 1000.0));
      v[0][i] = f2r(r2f(z[i] - xpr[i]));
      v[1][i] = f2r(r2f(z[i] - xpr[6 + i]));
    end
    // measurement covariance: diagonal, positive
    for (int i = 0; i < 9; i++) rc_r[i] = (i % 4 == 0) ? f2r(r2f(real'($urandom % 100 + 1) / 100.0)) : 0.0;
    for (int j = 0; j < 2; j++) begin
      real a[9], sm[9];
      // predicted covariance block: symmetric positive definite, A A' + 0.3 I
      for (int i = 0; i < 9; i++) a[i] = (real'($urandom % 2000) - 1000.0) / 1000.0;
      for (int r = 0; r < 3; r++)
        for (int k = 0; k < 3; k++) begin
          real t;
          t = (r == k) ? 0.3 : 0.0;
          for (int x = 0; x < 3; x++) t += a[3 * r + x] * a[3 * k + x];
          pp_r[j][3 * r + k] = f2r(r2f(t));
        end
      // S = P + R as the adder rounds it, its determinant and inverse
      for (int i = 0; i < 9; i++) sm[i] = f2r(r2f(pp_r[j][i] + rc_r[i]));
      det[j] = sm[0] * (sm[4] * sm[8] - sm[5] * sm[7]) - sm[1] * (sm[3] * sm[8] - sm[5] * sm[6])
             + sm[2] * (sm[3] * sm[7] - sm[4] * sm[6]);
      si[j][0] = (sm[4] * sm[8] - sm[5] * sm[7]) / det[j];
      si[j][1] = (sm[2] * sm[7] - sm[1] * sm[8]) / det[j];
      si[j][2] = (sm[1] * sm[5] - sm[2] * sm[4]) / det[j];
      si[j][3] = (sm[5] * sm[6] - sm[3] * sm[8]) / det[j];
      si[j][4] = (sm[0] * sm[8] - sm[2] * sm[6]) / det[j];
      si[j][5] = (sm[2] * sm[3] - sm[0] * sm[5]) / det[j];
      si[j][6] = (sm[3] * sm[7] - sm[4] * sm[6]) / det[j];
      si[j][7] = (sm[1] * sm[6] - sm[0] * sm[7]) / det[j];
      si[j][8] = (sm[0] * sm[4] - sm[1] * sm[3]) / det[j];
      si_max[j] = 0.0;
      for (int i = 0; i < 9; i++) si_max[j] = (fabs(si[j][i]) > si_max[j]) ? fabs(si[j][i]) : si_max[j];
    end
    // updated states: the two models agree to within a few units
    for (int i = 0; i < 6; i++) usx[i] = f2r(r2f((real'($urandom % 2000000) - 1000000.0) / 64.0));
    for (int i = 0; i < 9; i++)
      usx[6 + i] = f2r(r2f((i < 6 ? usx[i] : 0.0) + (real'($urandom % 2000) - 1000.0) / 500.0));
    // IMM model probability update and combination
    for (int j = 0; j < 2; j++) begin
      cb[j] = P[j] * u_prev[0] + P[2 + j] * u_prev[1];
      q = 0.0;
      for (int r = 0; r < 3; r++)
        for (int k = 0; k < 3; k++) q += v[j][r] * si[j][3 * r + k] * v[j][k];
      lam[j] = $exp(-0.5 * q) / $sqrt((2.0 * 3.14159265358979) ** 3 * det[j]);
    end
    c = lam[0] * cb[0] + lam[1] * cb[1];
    for (int j = 0; j < 2; j++) mp_new[j] = lam[j] * cb[j] / c;
    for (int i = 0; i < 9; i++)
      exp_oex.push_back((i < 6 ? usx[i] * mp_new[0] : 0.0) + usx[6 + i] * mp_new[1]);
  endtask

  task automatic expect_prediction();
    for (int j = 0; j < 2; j++) exp_pmp.push_back(P[j] * u_prev[0] + P[2 + j] * u_prev[1]);
    for (int j = 0; j < 2; j++)
      for (int i = 0; i < 2; i++)
        exp_mixw.push_back(P[2 * i + j] * u_prev[i] / (P[j] * u_prev[0] + P[2 + j] * u_prev[1]));
  endtask

  // stand-in blocks: converted measurement and its covariance, per model
  // the predicted covariance block, then updated states and covariances
  logic [31:0] cov_words[N_COV];
  task automatic run_filters();
    for (int i = 0; i < 9; i++) begin
      @(negedge clk);
      rcov_valid = 1; rcov = r2f(rc_r[i]);
      zc_valid = (i < 3); zc = r2f(z[i % 3]);
    end
    @(negedge clk) rcov_valid = 0; zc_valid = 0;
    for (int j = 0; j < 2; j++) begin
      for (int i = 0; i < 9; i++) begin
        @(negedge clk);
        ppos_valid = 1; ppos = r2f(pp_r[j][i]);
      end
      @(negedge clk) ppos_valid = 0;
      // the next model's covariance block may follow once msme of this one is out
      wait (dut.msme_v);
    end
    for (int i = 0; i < 15; i++) begin
      @(negedge clk) upd_state_valid = 1; upd_state = r2f(usx[i]);
    end
    @(negedge clk) upd_state_valid = 0;
    for (int i = 0; i < N_COV; i++) begin
      cov_words[i] = $urandom;
      @(negedge clk) upd_cov_valid = 1; upd_cov = cov_words[i];
    end
    @(negedge clk) upd_cov_valid = 0;
  endtask

  task automatic read_results();
    logic [31:0] w;
    logic [7:0]  b;
    bit          dr;
    int          guard;
    guard = 0;
    while (int_n[0] && guard < 5000) begin
      @(posedge clk);
      guard++;
    end
    chk("interrupt raised", !int_n[0]);
    bfm.read_byte(8'h44, b, dr);
    chk("status ready", b[0] == 1'b1 && dr);
    n_status++;
    for (int i = 0; i < 9; i++) begin
      real want;
      bfm.read_word(8'h40, w, dr);
      want = exp_oex.pop_front();
      chk($sformatf("result[%0d] %g want %g", i, f2r(w), want),
          dr && close(f2r(w), want, 2.0e-6, fabs(want) + fabs(usx[6 + i])));
      n_readback++;
    end
    repeat (4) @(posedge clk);
    chk("interrupt cleared after read-back", int_n[0]);
    bfm.read_byte(8'h44, b, dr);
    chk("status cleared", b[0] == 1'b0);
  endtask

  task automatic write_word_f(input logic [7:0] addr, input logic [31:0] w);
    bfm.write_word(addr, w);
    n_word_wr++;
  endtask

  initial begin
    real r, th, el;
    logic [31:0] fifo_state[$], fifo_cov[$];
    real         ist[15];
    upd_state_valid = 0; upd_cov_valid = 0; zc_valid = 0; rcov_valid = 0; ppos_valid = 0;
    upd_state = 0; upd_cov = 0; zc = 0; rcov = 0; ppos = 0;
    repeat (4) @(posedge clk);
    @(negedge clk) rst = 0;

    // ---------------- frame 1: initial values
    bfm.write_byte(8'h38, 8'h00); n_ctrl_wr++;          // initial values selected
    P[0] = f2r(r2f(0.99)); P[1] = f2r(r2f(0.01)); P[2] = f2r(r2f(0.01)); P[3] = f2r(r2f(0.99));
    for (int k = 0; k < 4; k++) write_word_f(8'h30, r2f(P[k]));
    for (int i = 0; i < 15; i++) begin
      logic [31:0] w;
      // the two models' initial states agree to within a few units
      w = (i < 6) ? r2f((real'($urandom % 20000) - 10000.0) / 3.0)
                  : r2f((i < 12 ? ist[i - 6] : 0.0) + (real'($urandom % 2000) - 1000.0) / 500.0);
      ist[i] = f2r(w);
      exp_state.push_back(w);
      write_word_f(8'h20, w);
    end
    for (int i = 0; i < N_COV; i++) begin
      logic [31:0] w;
      w = $urandom;
      exp_cov.push_back(w);
      write_word_f(8'h24, w);
    end
    u_prev[0] = 0.5; u_prev[1] = 0.5;
    expect_prediction();
    for (int j = 0; j < 2; j++) write_word_f(8'h2C, r2f(u_prev[j]));
    // measurement from the scenario's initial position (10000, 6000, 4000) m
    r  = $sqrt(10000.0 ** 2 + 6000.0 ** 2 + 4000.0 ** 2);
    th = $atan2(6000.0, 10000.0);
    el = $asin(4000.0 / r);
    exp_meas.push_back(r2f(r)); exp_meas.push_back(r2f(th)); exp_meas.push_back(r2f(el));
    write_word_f(8'h28, r2f(r)); write_word_f(8'h28, r2f(th)); write_word_f(8'h28, r2f(el));
    repeat (60) @(posedge clk);
    chk("frame 1: selectors passed all initial values", exp_state.size() == 0 && exp_cov.size() == 0);
    chk("frame 1: prediction done", exp_pmp.size() == 0 && exp_mixw.size() == 0);
    chk("frame 1: predicted states out", n_xp == 15);
    make_frame_data();
    run_filters();
    for (int i = 0; i < 15; i++) fifo_state.push_back(r2f(usx[i]));
    for (int i = 0; i < N_COV; i++) fifo_cov.push_back(cov_words[i]);
    read_results();
    u_prev[0] = f2r(r2f(mp_new[0])); u_prev[1] = f2r(r2f(mp_new[1]));

    // ---------------- frames 2 and 3: loop values
    for (int f = 2; f <= 3; f++) begin
      while (fifo_state.size() != 0) exp_state.push_back(fifo_state.pop_front());
      while (fifo_cov.size() != 0) exp_cov.push_back(fifo_cov.pop_front());
      expect_prediction();
      bfm.write_byte(8'h38, 8'h03); n_ctrl_wr++;          // loop values, start
      exp_meas.push_back(r2f(r - 30.0 * f));
      write_word_f(8'h28, r2f(r - 30.0 * f));
      repeat (200) @(posedge clk);
      chk($sformatf("frame %0d: FIFOs handed back state and covariance", f), exp_state.size() == 0 && exp_cov.size() == 0);
      chk($sformatf("frame %0d: prediction from loop probabilities", f), exp_pmp.size() == 0 && exp_mixw.size() == 0);
      chk($sformatf("frame %0d: predicted states out", f), n_xp == 15 * f);
      make_frame_data();
      run_filters();
      for (int i = 0; i < 15; i++) fifo_state.push_back(r2f(usx[i]));
      for (int i = 0; i < N_COV; i++) fifo_cov.push_back(cov_words[i]);
      u_prev[0] = f2r(r2f(mp_new[0])); u_prev[1] = f2r(r2f(mp_new[1]));
      if (f == 2) begin
        read_results();
      end else begin
        // frame 3 is not read back: a control write clears its interrupt
        repeat (200) @(posedge clk);
        chk("frame 3: interrupt raised", !int_n[0]);
        bfm.write_byte(8'h38, 8'h01); n_ctrl_wr++;
        repeat (4) @(posedge clk);
        chk("interrupt cleared by control write", int_n[0]);
        repeat (9) void'(exp_oex.pop_front());
      end
    end

    chk("all measurement words passed", exp_meas.size() == 0 && n_meas == 5);
    // every mechanism must have happened
    chk($sformatf("word writes %0d", n_word_wr), n_word_wr > 0);
    chk($sformatf("control writes %0d", n_ctrl_wr), n_ctrl_wr >= 2);
    chk($sformatf("initial selection %0d/%0d", n_state_init, n_cov_init), n_state_init == 15 && n_cov_init == N_COV);
    chk($sformatf("loop selection %0d/%0d", n_state_loop, n_cov_loop), n_state_loop == 30 && n_cov_loop == 2 * N_COV);
    chk($sformatf("FIFO drain reads %0d", n_drain), n_drain == 30);
    chk($sformatf("predictions %0d/%0d", n_pmp, n_mixw), n_pmp == 6 && n_mixw == 12);
    chk($sformatf("combined outputs %0d", n_oex), n_oex == 27);
    chk($sformatf("mixed start states %0d", n_x0), n_x0 == 45);
    chk($sformatf("predicted states %0d", n_xp), n_xp == 45);
    chk($sformatf("residual covariance words %0d", n_s), n_s == 54);
    chk($sformatf("inverse words %0d", n_si), n_si == 54);
    chk($sformatf("interrupts raised %0d cleared %0d", n_irq_raise, n_irq_clear), n_irq_raise == 3 && n_irq_clear == 3);
    chk($sformatf("result words read %0d", n_readback), n_readback == 18);
    chk($sformatf("status reads %0d", n_status), n_status == 2);
    $display("mechanisms: word writes %0d, control writes %0d, initial selection %0d, loop selection %0d, FIFO drains %0d, interrupts %0d, result words %0d, status reads %0d, mixed states %0d, predicted states %0d, S words %0d, inverse words %0d",
             n_word_wr, n_ctrl_wr, n_state_init + n_cov_init, n_state_loop + n_cov_loop, n_drain, n_irq_raise, n_readback, n_status, n_x0, n_xp, n_s, n_si);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog timeout");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
