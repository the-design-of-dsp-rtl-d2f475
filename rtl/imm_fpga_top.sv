// imm_fpga_top: the FPGA floating-point co-processor of the DSP/FPGA
// maneuvering-target tracker (IMM filter over a constant-velocity and a
// constant-acceleration model, fed with debiased converted measurements).
//
// What is inside: the DSP's memory-interface slave, the model-probability
// loop of the interacting multiple model filter (prediction and mixing
// weights, likelihood in two steps, normalisation), the mixed state
// estimation that forms each model's start state and the one-step state
// prediction of both models, the measurement residual and its covariance,
// the inverse and determinant of that covariance,
// the state interaction
// output that forms the combined estimate, a result buffer the DSP reads
// back after an interrupt, and the three loop FIFOs and three
// double-selection modules that hand each frame's updated state, covariance
// and model probabilities to the next frame (or, in the first frame, the
// initial values written by the DSP).
//
// What is outside: the coordinate conversion (spherical to Cartesian with
// its debiasing), the two model-conditioned Kalman filters (mixing of
// covariance, covariance prediction, gain, state and covariance update). Their signals
// are ports of this module, as word streams with a valid bit:
//   meas_word        measurement words from the DSP (range, azimuth,
//                    elevation), towards the coordinate conversion
//   state_in         initial or loop state (also used inside, by the mixed
//                    state estimation), towards the mixed covariance
//   x0               mixed start states: 6 words with x0_valid_cv, then 9
//                    words with x0_valid_ca (observation; they feed the
//                    state prediction inside)
//   xp               predicted states X(k|k-1): 6 words with xp_valid_cv,
//                    then 9 with xp_valid_ca (observation; they feed the
//                    residual inside), towards the gain and state update
//   zc, rcov         converted measurement (3 words) and its covariance R
//                    (9 words, row-major) per frame, from the conversion
//   ppos             per model, the upper-left 3x3 block of the predicted
//                    covariance (9 words), from the covariance prediction;
//                    model 2 once the likelihood step has taken model 1's
//                    inverse (msme of model 1 is out)
//   s_cov            residual covariance S per model (9 words; observation,
//                    it feeds the inverse inside)
//   sinv             inverse residual covariance per model (9 words,
//                    row-major), towards the gain
//   cov_in           initial or loop covariance, towards the mixed covariance
//   pmp / mixw       predicted model probabilities and mixing weights
//   upd_state        updated states, 6 of model 1 then 9 of model 2
//   upd_cov          updated covariances, model 1 then model 2
//
// DSP memory map (byte-wide, 32-bit words most significant byte first):
//   0x20 W  initial state (15 words)      0x24 W  initial covariance
//   0x28 W  measurement words             0x2C W  initial model probability (2)
//   0x30 W  transition probabilities P11 P12 P21 P22
//   0x38 W  control byte: bit 0 selects the loop values (0: initial values),
//           bit 1 starts a frame (the loop FIFOs are drained); any control
//           write clears the interrupt
//   0x40 R  result: 9 words of the combined state, 36 bytes in order
//   0x44 R  status: bit 0 result ready
// int_n[0] goes low when all 9 result words are in the buffer and high again
// after the last result byte is read or a control byte is written;
// int_n[4:1] stay high.
// Address 0x28 and the byte order are those of the original write sequence;
// the rest of the map is this design's own.
module imm_fpga_top
  import fp_pkg::*;
#(
  parameter int unsigned STATE_FIFO_DEPTH = 16,    // 6 + 9 state words
  parameter int unsigned COV_FIFO_DEPTH   = 128,   // 36 + 81 covariance words
  parameter int unsigned MP_FIFO_DEPTH    = 2      // 2 model probabilities
) (
  input  logic        clk,
  input  logic        rst,
  // DSP external memory interface
  input  logic        ce_n,
  input  logic        aoe_n,
  input  logic        awe_n,
  input  logic        are_n,
  input  logic [7:0]  a,
  input  logic [7:0]  d_in,
  output logic [7:0]  d_out,
  output logic        d_oe,
  output logic [4:0]  int_n,
  // towards the coordinate conversion and the model-conditioned filters
  output fp32_t       meas_word,
  output logic        meas_valid,
  output fp32_t       state_in,
  output logic        state_in_valid,
  output fp32_t       cov_in,
  output logic        cov_in_valid,
  output fp32_t       pmp,
  output logic        pmp_valid,
  output fp32_t       mixw,
  output logic        mixw_valid,
  output fp32_t       x0,
  output logic        x0_valid_cv,
  output logic        x0_valid_ca,
  output fp32_t       xp,
  output logic        xp_valid_cv,
  output logic        xp_valid_ca,
  // from the model-conditioned filters
  input  fp32_t       upd_state,
  input  logic        upd_state_valid,
  input  fp32_t       upd_cov,
  input  logic        upd_cov_valid,
  input  fp32_t       zc,
  input  logic        zc_valid,
  input  fp32_t       rcov,
  input  logic        rcov_valid,
  input  fp32_t       ppos,
  input  logic        ppos_valid,
  output fp32_t       s_cov,
  output logic        s_cov_valid,
  output fp32_t       sinv,
  output logic        sinv_valid,
  // combined estimate as it leaves the state interaction output
  output fp32_t       oex_word,
  output logic        oex_valid
);
  localparam logic [7:0] A_INIT_STATE = 8'h20;
  localparam logic [7:0] A_INIT_COV   = 8'h24;
  localparam logic [7:0] A_MEAS       = 8'h28;
  localparam logic [7:0] A_INIT_MP    = 8'h2C;
  localparam logic [7:0] A_PTRANS     = 8'h30;
  localparam logic [7:0] A_CTRL       = 8'h38;
  localparam logic [7:0] A_RESULT     = 8'h40;
  localparam logic [7:0] A_STATUS     = 8'h44;
  localparam int unsigned N_OUT       = 9;

  // ---------------------------------------------------------------- EMIF
  logic        wv, bv, rd_req;
  logic [7:0]  wa, ba, bd, rd_addr, rd_data;
  fp32_t       wd;
  logic [4:0]  irq;

  emif_slave #(.CTRL_BASE(A_CTRL)) u_emif (
    .clk, .rst, .ce_n, .aoe_n, .awe_n, .are_n, .a, .d_in, .d_out, .d_oe, .int_n,
    .wr_word_valid(wv), .wr_word_addr(wa), .wr_word(wd),
    .wr_byte_valid(bv), .wr_byte_addr(ba), .wr_byte(bd),
    .rd_req, .rd_addr, .rd_data, .irq
  );

  wire w_state = wv && wa == A_INIT_STATE;
  wire w_cov   = wv && wa == A_INIT_COV;
  wire w_mp    = wv && wa == A_INIT_MP;
  wire w_ptr   = wv && wa == A_PTRANS;
  assign meas_valid = wv && wa == A_MEAS;
  assign meas_word  = wd;

  // control register
  logic sel_loop, start;
  wire  w_ctrl = bv && ba == A_CTRL;
  always_ff @(posedge clk) begin
    if (rst) begin
      sel_loop <= 1'b0;
      start    <= 1'b0;
    end else begin
      start <= w_ctrl && bd[1];
      if (w_ctrl) sel_loop <= bd[0];
    end
  end

  // ---------------------------------------------------------- loop FIFOs
  logic  drain_s, drain_c, drain_m;
  logic  s_empty, c_empty, m_empty;
  fp32_t s_q, c_q, m_q;
  logic  s_qv, c_qv, m_qv;
  logic  mp_to_fifo, mp_to_oex;
  fp32_t mp_w;

  always_ff @(posedge clk) begin
    if (rst) begin
      drain_s <= 1'b0;
      drain_c <= 1'b0;
      drain_m <= 1'b0;
    end else if (start && sel_loop) begin
      drain_s <= 1'b1;
      drain_c <= 1'b1;
      drain_m <= 1'b1;
    end else begin
      if (s_empty) drain_s <= 1'b0;
      if (c_empty) drain_c <= 1'b0;
      if (m_empty) drain_m <= 1'b0;
    end
  end

  loop_fifo #(.DEPTH(STATE_FIFO_DEPTH)) u_fifo_state (
    .clk, .rst, .wr_en(upd_state_valid), .din(upd_state), .rd_en(drain_s),
    .dout(s_q), .dout_valid(s_qv), .count(), .full(), .empty(s_empty)
  );
  loop_fifo #(.DEPTH(COV_FIFO_DEPTH)) u_fifo_cov (
    .clk, .rst, .wr_en(upd_cov_valid), .din(upd_cov), .rd_en(drain_c),
    .dout(c_q), .dout_valid(c_qv), .count(), .full(), .empty(c_empty)
  );
  loop_fifo #(.DEPTH(MP_FIFO_DEPTH)) u_fifo_mp (
    .clk, .rst, .wr_en(mp_to_fifo), .din(mp_w), .rd_en(drain_m),
    .dout(m_q), .dout_valid(m_qv), .count(), .full(), .empty(m_empty)
  );

  // ------------------------------------------------- double selection x3
  fp32_t u_in;
  logic  u_in_valid;
  init_select u_mux_cov   (.sel_loop, .init_data(wd), .init_valid(w_cov),   .loop_data(c_q),
                           .loop_valid(c_qv), .dout(cov_in),   .dout_valid(cov_in_valid));
  init_select u_mux_state (.sel_loop, .init_data(wd), .init_valid(w_state), .loop_data(s_q),
                           .loop_valid(s_qv), .dout(state_in), .dout_valid(state_in_valid));
  init_select u_mux_mp    (.sel_loop, .init_data(wd), .init_valid(w_mp),    .loop_data(m_q),
                           .loop_valid(m_qv), .dout(u_in),     .dout_valid(u_in_valid));

  // --------------------------------------------- model probability loop
  mp_predict u_predict (
    .clk, .rst, .u(u_in), .clk_enable_u(u_in_valid), .ptrans(wd), .clk_enable_ptrans(w_ptr),
    .pmp, .clk_enable_pmp(pmp_valid), .mixw, .clk_enable_mixw(mixw_valid)
  );

  // ------------------------------------------------ mixed state estimation
  mix_state u_mix (
    .clk, .rst, .Xs(state_in), .clk_enable_Xs(state_in_valid), .mixw, .clk_enable_mixw(mixw_valid),
    .X0(x0), .clk_enable_X01(x0_valid_cv), .clk_enable_X02(x0_valid_ca)
  );

  // ------------------------------------------------ one-step prediction
  state_predict u_pred (
    .clk, .rst, .X0(x0), .clk_enable_X01(x0_valid_cv), .clk_enable_X02(x0_valid_ca),
    .Xp(xp), .clk_enable_Xp1(xp_valid_cv), .clk_enable_Xp2(xp_valid_ca)
  );

  // ------------------------------------- residual and residual covariance
  fp32_t resid;
  logic  resid_valid;
  residual u_res (
    .clk, .rst, .Z(zc), .clk_enable_Z(zc_valid), .R(rcov), .clk_enable_R(rcov_valid),
    .Xp(xp), .clk_enable_Xp1(xp_valid_cv), .clk_enable_Xp2(xp_valid_ca),
    .Pp(ppos), .clk_enable_Pp(ppos_valid), .v(resid), .clk_enable_v(resid_valid),
    .S(s_cov), .clk_enable_S(s_cov_valid)
  );

  // ----------------------------------- inverse and determinant of S
  fp32_t sdet;
  logic  sdet_valid;
  mat_inv3 u_inv (
    .clk, .rst, .S(s_cov), .clk_enable_S(s_cov_valid), .Sinv(sinv), .clk_enable_Sinv(sinv_valid),
    .det(sdet), .clk_enable_det(sdet_valid)
  );

  fp32_t msme, ml;
  logic  msme_v, ml_v;
  mp_update1 u_mpu1 (
    .clk, .rst, .Zk(resid), .clk_enable_Zk(resid_valid), .R12temp(sinv),
    .clk_enable_R12temp(sinv_valid), .msme, .clk_enable_msme(msme_v)
  );
  mp_update2 u_mpu2 (
    .clk, .rst, .msme, .clk_enable_msme(msme_v), .rttemp(sdet), .clk_enable_rttemp(sdet_valid),
    .ml, .clk_enable_ml(ml_v)
  );
  mp_update3 u_mpu3 (
    .clk, .rst, .ml, .clk_enable_ml(ml_v), .pmp, .clk_enable_pmp(pmp_valid),
    .mp(mp_w), .clk_enable_mp_to_oex(mp_to_oex), .clk_enable_mp_to_fifo(mp_to_fifo)
  );

  // ------------------------------------------- state interaction output
  oex u_oex (
    .clk, .rst, .Mp(mp_w), .clk_enable_Mp(mp_to_oex), .Usx(upd_state),
    .clk_enable_Usx(upd_state_valid), .Oex(oex_word), .clk_enable_Oex(oex_valid)
  );

  // ------------------------------------------ result buffer and interrupt
  fp32_t      res [N_OUT];
  logic [3:0] res_cnt;
  logic [5:0] rptr;
  logic       ready;

  always_ff @(posedge clk) begin
    if (rst) begin
      res_cnt <= '0;
      rptr    <= '0;
      ready   <= 1'b0;
    end else begin
      if (oex_valid) begin
        res[res_cnt] <= oex_word;
        if (res_cnt == 4'(N_OUT - 1)) begin
          res_cnt <= '0;
          ready   <= 1'b1;
          rptr    <= '0;
        end else begin
          res_cnt <= res_cnt + 4'd1;
        end
      end
      if (rd_req && rd_addr == A_RESULT) begin
        if (rptr == 6'(4 * N_OUT - 1)) begin
          rptr  <= '0;
          ready <= 1'b0;
        end else begin
          rptr <= rptr + 6'd1;
        end
      end
      if (w_ctrl) ready <= 1'b0;
    end
  end

  always_comb begin
    fp32_t wsel;
    wsel    = res[rptr[5:2]];
    rd_data = 8'h00;
    if (rd_addr == A_RESULT)      rd_data = wsel[8 * (3 - int'(rptr[1:0])) +: 8];
    else if (rd_addr == A_STATUS) rd_data = {7'd0, ready};
    irq = {4'b0000, ready};
  end
endmodule
