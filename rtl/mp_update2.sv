// mp_update2: model probability update module 2. Completes the Gaussian
// likelihood of one model,
//   ml = msme / sqrt(|2*pi*S|) = msme / sqrt((2*pi)^3 * det S),
// from the output msme of module 1 and the determinant of the 3x3 residual
// covariance S (port rttemp).
//
// Each input is one word, taken while its enable is high, into a two-entry
// queue; the two may come in either order. Once both queues hold a word,
// the determinant goes through a pipelined multiplier (5 cycles, by the constant (2*pi)^3), a pipelined
// square root (16 cycles) and a pipelined divider (6 cycles); msme travels
// beside the multiplier and the square root through delay registers of 5
// and 16 cycles so that it meets the root at the divider. ml is then valid
// for one clock with clk_enable_ml high, from the 27th rising edge after the
// edge that took the last input. The multiplier, root, divider and the 5/16
// delay registers follow the original design; the divider latency and the
// use of a constant operand for the multiplier are this design's choices.
module mp_update2
  import fp_pkg::*;
(
  input  logic  clk,
  input  logic  rst,
  input  fp32_t msme,
  input  logic  clk_enable_msme,
  input  fp32_t rttemp,
  input  logic  clk_enable_rttemp,
  output fp32_t ml,
  output logic  clk_enable_ml
);
  // two-entry input queues: the determinant of the next model may arrive
  // before msme of the current one
  fp32_t      m_q [2];
  fp32_t      d_q [2];
  logic [1:0] m_cnt, d_cnt;
  logic       go;
  fp32_t      m_reg, d_reg;

  assign go    = (m_cnt != 2'd0) && (d_cnt != 2'd0);
  assign m_reg = m_q[0];
  assign d_reg = d_q[0];

  always_ff @(posedge clk) begin
    if (rst) begin
      m_cnt <= '0;
      d_cnt <= '0;
    end else begin
      // pop on go, push behind what remains
      if (go) m_q[0] <= m_q[1];
      if (clk_enable_msme && (m_cnt != 2'd2 || go))
        m_q[(go ? m_cnt - 2'd1 : m_cnt) == 2'd0 ? 0 : 1] <= msme;
      m_cnt <= m_cnt + 2'(clk_enable_msme && (m_cnt != 2'd2 || go)) - 2'(go);
      if (go) d_q[0] <= d_q[1];
      if (clk_enable_rttemp && (d_cnt != 2'd2 || go))
        d_q[(go ? d_cnt - 2'd1 : d_cnt) == 2'd0 ? 0 : 1] <= rttemp;
      d_cnt <= d_cnt + 2'(clk_enable_rttemp && (d_cnt != 2'd2 || go)) - 2'(go);
    end
  end

  fp32_t g, root, m_d5, m_d21;
  logic  g_v, root_v, m_d5_v, m_d21_v;

  fp_mul  #(.LAT(5))  u_mul  (.clk, .rst, .in_valid(go), .a(d_reg), .b(FP_2PI_CUB),
                              .out_valid(g_v), .y(g));
  fp_sqrt #(.LAT(16)) u_sqrt (.clk, .rst, .in_valid(g_v), .a(g), .out_valid(root_v), .y(root));
  fp_delay #(.WIDTH(32), .LAT(5))  u_dly5  (.clk, .rst, .in_valid(go), .in_data(m_reg),
                                            .out_valid(m_d5_v), .out_data(m_d5));
  fp_delay #(.WIDTH(32), .LAT(16)) u_dly16 (.clk, .rst, .in_valid(m_d5_v), .in_data(m_d5),
                                            .out_valid(m_d21_v), .out_data(m_d21));
  fp_div  #(.LAT(6))  u_div  (.clk, .rst, .in_valid(root_v & m_d21_v), .a(m_d21), .b(root),
                              .out_valid(clk_enable_ml), .y(ml));
endmodule
