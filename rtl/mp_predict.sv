// mp_predict: model probability prediction and mixing weight module, the
// first step (model interaction) of the interacting multiple model filter
// for r = 2 models:
//   pmp_j      = Cbar_j = sum_i P_ij * u_i            (predicted probability)
//   mixw_(i|j) = P_ij * u_i / Cbar_j                  (mixing weight)
// where u_i is the model probability of the previous frame and P_ij the
// probability of a transition from model i to model j.
//
// Interface: the 4 words of P arrive on ptrans (P11, P12, P21, P22) while
// clk_enable_ptrans is high and stay held for all later frames until P is
// written again. Each frame, 2 words of u arrive on u while clk_enable_u is
// high. Two pipelined multipliers (5 cycles) form P_1j*u_1 and P_2j*u_2 for
// j = 1 and then j = 2 on the next clock, a pipelined adder (7 cycles) sums
// each pair and the sums leave on pmp on two consecutive clocks with
// clk_enable_pmp high, from the 13th rising edge after the last u word. The
// four products and two sums are then held and fed to one pipelined divider
// (6 cycles) on four consecutive clocks; the mixing weights leave on mixw in
// the order (1|1), (2|1), (1|2), (2|2) with clk_enable_mixw high. The
// formulas are those of the model interaction step; the schedule, word order
// and unit count are this design's own.
module mp_predict
  import fp_pkg::*;
(
  input  logic  clk,
  input  logic  rst,
  input  fp32_t u,
  input  logic  clk_enable_u,
  input  fp32_t ptrans,
  input  logic  clk_enable_ptrans,
  output fp32_t pmp,
  output logic  clk_enable_pmp,
  output fp32_t mixw,
  output logic  clk_enable_mixw
);
  fp32_t      pt [4];      // P11 P12 P21 P22
  fp32_t      um [2];
  logic [1:0] pt_cnt;
  logic       pt_loaded;
  logic [1:0] u_cnt;
  logic [1:0] issue;       // 0: idle, 1: j = 1, 2: j = 2

  always_ff @(posedge clk) begin
    if (rst) begin
      pt_cnt    <= '0;
      pt_loaded <= 1'b0;
      u_cnt     <= '0;
      issue     <= '0;
    end else begin
      if (clk_enable_ptrans) begin
        pt[pt_cnt] <= ptrans;
        pt_cnt     <= pt_cnt + 2'd1;
        if (pt_cnt == 2'd3) pt_loaded <= 1'b1;
      end
      if (clk_enable_u && u_cnt != 2'd2) begin
        um[u_cnt[0]] <= u;
        u_cnt        <= u_cnt + 2'd1;
      end
      unique case (issue)
        2'd0: if (u_cnt == 2'd2 && pt_loaded) issue <= 2'd1;
        2'd1: issue <= 2'd2;
        default: begin
          issue <= 2'd0;
          u_cnt <= '0;
        end
      endcase
    end
  end

  // products P_1j*u_1 and P_2j*u_2 for the column j being issued
  fp32_t a1, a2, p1, p2, c, p1_d, p2_d;
  logic  mv, p1_v, p2_v, c_v, p1_d_v, p2_d_v;
  always_comb begin
    mv = (issue != 2'd0);
    a1 = (issue == 2'd2) ? pt[1] : pt[0];
    a2 = (issue == 2'd2) ? pt[3] : pt[2];
  end
  fp_mul #(.LAT(5)) u_mul1 (.clk, .rst, .in_valid(mv), .a(a1), .b(um[0]), .out_valid(p1_v), .y(p1));
  fp_mul #(.LAT(5)) u_mul2 (.clk, .rst, .in_valid(mv), .a(a2), .b(um[1]), .out_valid(p2_v), .y(p2));
  fp_addsub #(.LAT(7)) u_add (.clk, .rst, .in_valid(p1_v & p2_v), .a(p1), .b(p2), .sub(1'b0),
                              .out_valid(c_v), .y(c));
  fp_delay #(.WIDTH(32), .LAT(7)) u_dly1 (.clk, .rst, .in_valid(p1_v), .in_data(p1),
                                          .out_valid(p1_d_v), .out_data(p1_d));
  fp_delay #(.WIDTH(32), .LAT(7)) u_dly2 (.clk, .rst, .in_valid(p2_v), .in_data(p2),
                                          .out_valid(p2_d_v), .out_data(p2_d));
  assign pmp            = c;
  assign clk_enable_pmp = c_v;

  // hold both columns, then divide: num[k] / den[k >> 1]
  fp32_t      num [4];
  fp32_t      den [2];
  logic       col;
  logic [2:0] dcnt;        // 0..3 dividing, 4 idle
  always_ff @(posedge clk) begin
    if (rst) begin
      col  <= 1'b0;
      dcnt <= 3'd4;
    end else begin
      if (c_v && p1_d_v && p2_d_v) begin
        num[{col, 1'b0}] <= p1_d;
        num[{col, 1'b1}] <= p2_d;
        den[col]         <= c;
        col              <= ~col;
        if (col) dcnt <= 3'd0;
      end
      if (dcnt != 3'd4) dcnt <= dcnt + 3'd1;
    end
  end

  fp_div #(.LAT(6)) u_div (.clk, .rst, .in_valid(dcnt != 3'd4), .a(num[dcnt[1:0]]), .b(den[dcnt[1]]),
                           .out_valid(clk_enable_mixw), .y(mixw));
endmodule
