// mp_update1: model probability update module 1. Computes the exponential
// part of the Gaussian likelihood of one model,
//   msme = exp(-1/2 * v' * Sinv * v),
// from the 3-element measurement residual v (port Zk) and the 9 elements of
// the inverse residual covariance Sinv (port R12temp, row-major order).
//
// Inputs arrive one word per clock: 3 words of Zk while clk_enable_Zk is high
// and 9 words of R12temp while clk_enable_R12temp is high, in either order,
// each into its own register file. The quadratic form is then evaluated in
// two passes through one datapath of three pipelined multipliers (5 cycles),
// two pipelined adders (7 cycles) and a 7-cycle delay register that holds
// the third product while the first two are being added:
//   row(a, b) = (a0*b0 + a1*b1) + a2*b2          19 cycles
//   pass 1: w_i = row(Sinv[i][*], v)  for i = 0, 1, 2 on consecutive clocks
//   pass 2: q   = row(w, v)
// The scaling by -1/2 is exact and needs no multiplier: the sign bit is
// flipped and the exponent decremented. The pipelined exponential (17 cycles)
// then produces msme, one word with clk_enable_msme high for one clock,
// valid from the 59th rising edge after the edge that took the last input.
//
// The original module uses three multipliers, six adders and an exponential
// with 5- and 7-cycle delay registers; its exact wiring is not recoverable.
// This design reuses the same multipliers and adders for both passes
// (time-multiplexing, which the original applies elsewhere), so it needs only
// two adders. The module handles one model per run; the two models are
// processed one after the other.
module mp_update1
  import fp_pkg::*;
(
  input  logic  clk,
  input  logic  rst,
  input  fp32_t Zk,
  input  logic  clk_enable_Zk,
  input  fp32_t R12temp,
  input  logic  clk_enable_R12temp,
  output fp32_t msme,
  output logic  clk_enable_msme
);
  typedef enum logic [2:0] {S_LOAD, S_PASS1, S_WAIT1, S_PASS2, S_WAIT2} state_t;
  state_t state;

  fp32_t      v   [3];
  fp32_t      s   [9];
  fp32_t      w   [3];
  logic [1:0] v_cnt, row, w_cnt;
  logic [3:0] s_cnt;

  wire v_full = (v_cnt == 2'd3);
  wire s_full = (s_cnt == 4'd9);

  // shared row datapath
  logic  row_v;
  fp32_t ma [3];
  fp32_t mb [3];
  fp32_t p  [3];
  logic  p_v [3];
  fp32_t sum01, p2_d, q;
  logic  sum01_v, p2_d_v, q_v;

  always_comb begin
    row_v = 1'b0;
    for (int j = 0; j < 3; j++) begin
      ma[j] = FP_ZERO;
      mb[j] = v[j];
    end
    if (state == S_PASS1) begin
      row_v = 1'b1;
      for (int j = 0; j < 3; j++) ma[j] = s[3 * int'(row) + j];
    end else if (state == S_PASS2) begin
      row_v = 1'b1;
      for (int j = 0; j < 3; j++) ma[j] = w[j];
    end
  end

  for (genvar j = 0; j < 3; j++) begin : g_mul
    fp_mul #(.LAT(5)) u_mul (.clk, .rst, .in_valid(row_v), .a(ma[j]), .b(mb[j]),
                             .out_valid(p_v[j]), .y(p[j]));
  end

  fp_addsub #(.LAT(7)) u_add01 (.clk, .rst, .in_valid(p_v[0] & p_v[1]), .a(p[0]), .b(p[1]),
                                .sub(1'b0), .out_valid(sum01_v), .y(sum01));
  fp_delay #(.WIDTH(32), .LAT(7)) u_dly2 (.clk, .rst, .in_valid(p_v[2]), .in_data(p[2]),
                                          .out_valid(p2_d_v), .out_data(p2_d));
  fp_addsub #(.LAT(7)) u_add2 (.clk, .rst, .in_valid(sum01_v & p2_d_v), .a(sum01), .b(p2_d),
                               .sub(1'b0), .out_valid(q_v), .y(q));

  // -q/2 by flipping the sign and decrementing the exponent
  fp32_t neg_half_q;
  logic  exp_v;
  always_comb begin
    if (q[30:23] <= 8'd1) neg_half_q = FP_ZERO;
    else                  neg_half_q = {~q[31], q[30:23] - 8'd1, q[22:0]};
  end
  assign exp_v = q_v && (state == S_WAIT2);

  fp_exp #(.LAT(17)) u_exp (.clk, .rst, .in_valid(exp_v), .a(neg_half_q),
                            .out_valid(clk_enable_msme), .y(msme));

  always_ff @(posedge clk) begin
    if (rst) begin
      state <= S_LOAD;
      v_cnt <= '0;
      s_cnt <= '0;
      row   <= '0;
      w_cnt <= '0;
    end else begin
      unique case (state)
        S_LOAD: begin
          if (clk_enable_Zk && !v_full) begin
            v[v_cnt] <= Zk;
            v_cnt    <= v_cnt + 2'd1;
          end
          if (clk_enable_R12temp && !s_full) begin
            s[s_cnt] <= R12temp;
            s_cnt    <= s_cnt + 4'd1;
          end
          if (v_full && s_full) begin
            state <= S_PASS1;
            row   <= '0;
          end
        end
        S_PASS1: begin
          row <= row + 2'd1;
          if (row == 2'd2) begin
            state <= S_WAIT1;
            w_cnt <= '0;
          end
        end
        S_WAIT1: begin
          if (q_v) begin
            w[w_cnt] <= q;
            w_cnt    <= w_cnt + 2'd1;
            if (w_cnt == 2'd2) state <= S_PASS2;
          end
        end
        S_PASS2: state <= S_WAIT2;
        S_WAIT2: begin
          if (q_v) begin
            state <= S_LOAD;
            v_cnt <= '0;
            s_cnt <= '0;
          end
        end
        default: state <= S_LOAD;
      endcase
    end
  end
endmodule
