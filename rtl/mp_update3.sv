// mp_update3: model probability update module 3. Normalises the predicted
// model probabilities weighted by the model likelihoods,
//   mp_j = ml_j * pmp_j / (ml_1 * pmp_1 + ml_2 * pmp_2),   j = 1, 2,
// where ml_j is the likelihood of model j (from module 2) and pmp_j the
// predicted probability of model j (the normalising constant Cbar_j of the
// model interaction step).
//
// Inputs arrive one word per clock: 2 words of ml (model 1, then model 2)
// while clk_enable_ml is high and 2 words of pmp while clk_enable_pmp is high,
// in either order. Once all four are held, two pipelined multipliers
// (5 cycles) form both products at once, a pipelined adder (7 cycles) sums
// them while the products wait in 7-cycle delay registers, and one pipelined
// divider (6 cycles) then takes the two quotients on consecutive clocks. The
// two updated probabilities leave on mp on consecutive clocks, from the 19th
// rising edge after the last input, with both clk_enable_mp_to_oex (towards
// the state interaction output) and clk_enable_mp_to_fifo (towards the loop
// FIFO for the next frame) high; the FIFO enable drops once both are out.
// The unit count (2 multipliers, 1 adder, 1 divider) and the 7-cycle delay
// registers follow the original design; the rest is this design's choice.
module mp_update3
  import fp_pkg::*;
(
  input  logic  clk,
  input  logic  rst,
  input  fp32_t ml,
  input  logic  clk_enable_ml,
  input  fp32_t pmp,
  input  logic  clk_enable_pmp,
  output fp32_t mp,
  output logic  clk_enable_mp_to_oex,
  output logic  clk_enable_mp_to_fifo
);
  fp32_t      ml_m [2];
  fp32_t      pm_m [2];
  logic [1:0] ml_cnt, pm_cnt;
  logic       go, div2;

  always_ff @(posedge clk) begin
    if (rst) begin
      ml_cnt <= '0;
      pm_cnt <= '0;
      go     <= 1'b0;
    end else begin
      go <= 1'b0;
      if (clk_enable_ml && ml_cnt != 2'd2) begin
        ml_m[ml_cnt[0]] <= ml;
        ml_cnt          <= ml_cnt + 2'd1;
      end
      if (clk_enable_pmp && pm_cnt != 2'd2) begin
        pm_m[pm_cnt[0]] <= pmp;
        pm_cnt          <= pm_cnt + 2'd1;
      end
      if (ml_cnt == 2'd2 && pm_cnt == 2'd2) begin
        go     <= 1'b1;
        ml_cnt <= '0;
        pm_cnt <= '0;
      end
    end
  end

  fp32_t p1, p2, c, p1_d, p2_d;
  logic  p1_v, p2_v, c_v, p1_d_v, p2_d_v;
  fp_mul #(.LAT(5)) u_mul1 (.clk, .rst, .in_valid(go), .a(ml_m[0]), .b(pm_m[0]),
                            .out_valid(p1_v), .y(p1));
  fp_mul #(.LAT(5)) u_mul2 (.clk, .rst, .in_valid(go), .a(ml_m[1]), .b(pm_m[1]),
                            .out_valid(p2_v), .y(p2));
  fp_addsub #(.LAT(7)) u_add (.clk, .rst, .in_valid(p1_v & p2_v), .a(p1), .b(p2), .sub(1'b0),
                              .out_valid(c_v), .y(c));
  fp_delay #(.WIDTH(32), .LAT(7)) u_dly1 (.clk, .rst, .in_valid(p1_v), .in_data(p1),
                                          .out_valid(p1_d_v), .out_data(p1_d));
  fp_delay #(.WIDTH(32), .LAT(7)) u_dly2 (.clk, .rst, .in_valid(p2_v), .in_data(p2),
                                          .out_valid(p2_d_v), .out_data(p2_d));

  // second data distribution: p1/c now, p2/c on the next clock
  fp32_t c_hold, p2_hold, num, den;
  logic  div_v;
  always_ff @(posedge clk) begin
    if (rst) div2 <= 1'b0;
    else     div2 <= c_v;
    if (c_v) begin
      c_hold  <= c;
      p2_hold <= p2_d;
    end
  end
  always_comb begin
    div_v = (c_v & p1_d_v) | div2;
    num   = div2 ? p2_hold : p1_d;
    den   = div2 ? c_hold  : c;
  end

  logic mp_v;
  fp_div #(.LAT(6)) u_div (.clk, .rst, .in_valid(div_v), .a(num), .b(den),
                           .out_valid(mp_v), .y(mp));
  assign clk_enable_mp_to_oex  = mp_v;
  assign clk_enable_mp_to_fifo = mp_v;

  wire unused = p2_d_v;
endmodule
