// mix_state: mixed state estimation, the input interaction step of the
// interacting multiple model filter for the two models. For each model j it
// forms the start state of model j's filter from the previous frame's
// updated states x1 (constant velocity, 6 states) and x2 (constant
// acceleration, 9 states) and the mixing weights u(i|j):
//   X0j[e] = x1[e]*u(1|j) + x2[e]*u(2|j)
// Model 1 gets e = 0..5; model 2 gets e = 0..8, where x1 has no acceleration
// states and counts as 0 for e = 6..8.
//
// Interface: words arrive one per clock. Xs carries 15 words while
// clk_enable_Xs is high (6 states of model 1, then 9 of model 2: the order
// of the state loop FIFO); mixw carries 4 words while clk_enable_mixw is high
// in the order u(1|1), u(2|1), u(1|2), u(2|2). The streams may come in either
// order; each goes into its own register file. Once both are complete, 15
// element pairs are issued on consecutive clocks to two pipelined
// multipliers (5 cycles) and one pipelined adder (7 cycles). X0 then carries
// 6 words with clk_enable_X01 high (model 1) followed directly by 9 words
// with clk_enable_X02 high (model 2); the first comes 13 clocks after the
// edge that took the last input word. A new frame may be loaded once the
// previous one has been issued.
//
// The formula is the model interaction step of the filter; the datapath of
// two multipliers and one adder, the word orders and the treatment of the
// missing acceleration states of model 1 are this design's own choices.
module mix_state
  import fp_pkg::*;
#(
  parameter int unsigned N_CV = 6,   // states of the constant-velocity model
  parameter int unsigned N_CA = 9    // states of the constant-acceleration model
) (
  input  logic  clk,
  input  logic  rst,
  input  fp32_t Xs,
  input  logic  clk_enable_Xs,
  input  fp32_t mixw,
  input  logic  clk_enable_mixw,
  output fp32_t X0,
  output logic  clk_enable_X01,
  output logic  clk_enable_X02
);
  localparam int unsigned N_X  = N_CV + N_CA;
  localparam int unsigned CW   = $clog2(N_X + 1);

  fp32_t         x_mem [N_X];
  fp32_t         w_mem [4];
  logic [CW-1:0] x_cnt, n, o_cnt;
  logic [2:0]    w_cnt;
  logic          issuing;

  wire x_done = (x_cnt == CW'(N_X));
  wire w_done = (w_cnt == 3'd4);

  always_ff @(posedge clk) begin
    if (rst) begin
      x_cnt   <= '0;
      w_cnt   <= '0;
      issuing <= 1'b0;
      n       <= '0;
    end else begin
      if (clk_enable_Xs && !x_done) begin
        x_mem[x_cnt] <= Xs;
        x_cnt        <= x_cnt + 1'b1;
      end
      if (clk_enable_mixw && !w_done) begin
        w_mem[w_cnt[1:0]] <= mixw;
        w_cnt             <= w_cnt + 3'd1;
      end
      if (!issuing && x_done && w_done) begin
        issuing <= 1'b1;
        n       <= '0;
      end else if (issuing) begin
        if (n == CW'(N_X - 1)) begin
          issuing <= 1'b0;
          x_cnt   <= '0;
          w_cnt   <= '0;
        end
        n <= n + 1'b1;
      end
    end
  end

  // issue n: n < N_CV is element n of model 1, otherwise element n - N_CV of
  // model 2
  fp32_t a1, b1, a2, b2;
  always_comb begin
    int e;
    a1 = FP_ZERO; b1 = FP_ZERO; a2 = FP_ZERO; b2 = FP_ZERO;
    if (n < CW'(N_CV)) begin
      e  = int'(n);
      b1 = w_mem[0];
      b2 = w_mem[1];
    end else begin
      e  = int'(n) - int'(N_CV);
      b1 = w_mem[2];
      b2 = w_mem[3];
    end
    if (e < int'(N_CV)) a1 = x_mem[e];
    if (e < int'(N_CA)) a2 = x_mem[int'(N_CV) + e];
  end

  fp32_t p1, p2;
  logic  p1_v, p2_v, s_v;
  fp_mul #(.LAT(5)) u_mul1 (.clk, .rst, .in_valid(issuing), .a(a1), .b(b1), .out_valid(p1_v), .y(p1));
  fp_mul #(.LAT(5)) u_mul2 (.clk, .rst, .in_valid(issuing), .a(a2), .b(b2), .out_valid(p2_v), .y(p2));
  fp_addsub #(.LAT(7)) u_add (.clk, .rst, .in_valid(p1_v & p2_v), .a(p1), .b(p2), .sub(1'b0),
                              .out_valid(s_v), .y(X0));

  // output words are counted to tell model 1 from model 2
  always_ff @(posedge clk) begin
    if (rst)      o_cnt <= '0;
    else if (s_v) o_cnt <= (o_cnt == CW'(N_X - 1)) ? '0 : o_cnt + 1'b1;
  end
  assign clk_enable_X01 = s_v && (o_cnt <  CW'(N_CV));
  assign clk_enable_X02 = s_v && (o_cnt >= CW'(N_CV));
endmodule
