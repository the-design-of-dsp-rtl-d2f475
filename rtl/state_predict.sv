// state_predict: one-step state prediction of the two model-conditioned
// filters, X(k|k-1) = F_j X0j, with the constant-velocity matrix F_1 and the
// constant-acceleration matrix F_2 of the target model. With the state order
// [x y z vx vy vz ax ay az] every row of F has the form
//   Xp[e] = X0[e] + c1 * X0[e+3] + c2 * X0[e+6]
// with c1 = T where a velocity (CV, CA) or an acceleration (CA) feeds
// element e, and c2 = T^2/2 where an acceleration feeds a position (CA);
// missing terms are 0. The CV filter carries only its 6 position and
// velocity states (its F_1 rows for the accelerations are zero).
//
// Interface: X0 carries 6 words of the CV start state with clk_enable_X01
// high, then 9 words of the CA start state with clk_enable_X02 high, one
// word per clock (the output order of mix_state). Each model's words go
// into their own register file. When a model's vector is complete its
// elements are issued, one per clock, to two pipelined multipliers
// (5 cycles, c1 * X0[e+3] and c2 * X0[e+6]), an adder (7 cycles) that sums
// the two products, and a second adder (7 cycles) that adds X0[e], held in a
// 12-cycle delay line. Xp then carries 6 words with clk_enable_Xp1 high and
// 9 words with clk_enable_Xp2 high, on consecutive clocks per model; a
// model's first word comes 20 clocks after the edge that took its last
// input word (1 issue + 5 + 7 + 7). The CA vector is issued once the CV
// vector has been issued.
//
// The matrices and T = 10 ms follow the original target model; T^2/2 is
// computed from T when the design is elaborated. The schedule and the unit
// count are this design's own.
module state_predict
  import fp_pkg::*;
#(
  parameter fp32_t T = 32'h3C23_D70A   // sampling period, 0.01 s
) (
  input  logic  clk,
  input  logic  rst,
  input  fp32_t X0,
  input  logic  clk_enable_X01,
  input  logic  clk_enable_X02,
  output fp32_t Xp,
  output logic  clk_enable_Xp1,
  output logic  clk_enable_Xp2
);
  localparam fp32_t HALF_T2 = fp_mul(fp_mul(T, T), 32'h3F00_0000);

  fp32_t      m1 [6];
  fp32_t      m2 [9];
  logic [2:0] c1_cnt;
  logic [3:0] c2_cnt, e;
  logic       busy, model;   // model: 0 = CV issuing, 1 = CA issuing

  wire m1_full = (c1_cnt == 3'd6);
  wire m2_full = (c2_cnt == 4'd9);

  always_ff @(posedge clk) begin
    if (rst) begin
      c1_cnt <= '0;
      c2_cnt <= '0;
      busy   <= 1'b0;
      model  <= 1'b0;
      e      <= '0;
    end else begin
      if (clk_enable_X01 && !m1_full) begin
        m1[c1_cnt] <= X0;
        c1_cnt     <= c1_cnt + 3'd1;
      end
      if (clk_enable_X02 && !m2_full) begin
        m2[c2_cnt] <= X0;
        c2_cnt     <= c2_cnt + 4'd1;
      end
      if (!busy) begin
        if (m1_full) begin
          busy  <= 1'b1;
          model <= 1'b0;
          e     <= '0;
        end else if (m2_full) begin
          busy  <= 1'b1;
          model <= 1'b1;
          e     <= '0;
        end
      end else begin
        e <= e + 4'd1;
        if (!model && e == 4'd5) begin
          busy   <= 1'b0;
          c1_cnt <= '0;
        end else if (model && e == 4'd8) begin
          busy   <= 1'b0;
          c2_cnt <= '0;
        end
      end
    end
  end

  // row e of F_1 or F_2
  fp32_t xa, xb, xc, ka, kb;
  always_comb begin
    xa = FP_ZERO; xb = FP_ZERO; xc = FP_ZERO; ka = FP_ZERO; kb = FP_ZERO;
    if (!model) begin
      xa = m1[int'(e) % 6];
      if (e < 4'd3) begin
        xb = m1[int'(e) + 3];
        ka = T;
      end
    end else begin
      xa = m2[int'(e) % 9];
      if (e < 4'd6) begin
        xb = m2[int'(e) + 3];
        ka = T;
      end
      if (e < 4'd3) begin
        xc = m2[int'(e) + 6];
        kb = HALF_T2;
      end
    end
  end

  fp32_t pb, pc, s_bc, xa_d;
  logic  pb_v, pc_v, s_v, xa_v, y_v, tag_v, tag;
  fp_mul #(.LAT(5)) u_mul_b (.clk, .rst, .in_valid(busy), .a(xb), .b(ka), .out_valid(pb_v), .y(pb));
  fp_mul #(.LAT(5)) u_mul_c (.clk, .rst, .in_valid(busy), .a(xc), .b(kb), .out_valid(pc_v), .y(pc));
  fp_addsub #(.LAT(7)) u_add_bc (.clk, .rst, .in_valid(pb_v & pc_v), .a(pb), .b(pc), .sub(1'b0),
                                 .out_valid(s_v), .y(s_bc));
  fp_delay #(.WIDTH(32), .LAT(12)) u_dly_a (.clk, .rst, .in_valid(busy), .in_data(xa),
                                            .out_valid(xa_v), .out_data(xa_d));
  fp_addsub #(.LAT(7)) u_add_a (.clk, .rst, .in_valid(s_v & xa_v), .a(xa_d), .b(s_bc), .sub(1'b0),
                                .out_valid(y_v), .y(Xp));
  fp_delay #(.WIDTH(1), .LAT(19)) u_dly_tag (.clk, .rst, .in_valid(busy), .in_data(model),
                                             .out_valid(tag_v), .out_data(tag));

  assign clk_enable_Xp1 = y_v && tag_v && !tag;
  assign clk_enable_Xp2 = y_v && tag_v && tag;
endmodule
