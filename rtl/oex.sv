// oex: state interaction output module. Combines the two model-conditioned
// state estimates with the updated model probabilities into the overall
// estimate, X(k|k) = Usx1 * Mp1 + Usx2 * Mp2, written out element by element:
//   Oex[i] = Usx1[i]*Mp1 + Usx2[i]*Mp2   i = 0..5 (position, velocity)
//   Oex[i] = Usx2[i]*Mp2                 i = 6..8 (acceleration; the constant
//                                                  velocity model has none)
//
// Interface: words arrive one per clock. Usx carries 15 words while
// clk_enable_Usx is high: the 6 states of the constant-velocity model, then
// the 9 states of the constant-acceleration model. Mp carries 2 words while
// clk_enable_Mp is high: the probability of model 1, then of model 2. The two
// streams may arrive in either order or overlap; each goes into its own
// register file (the "RAM memory"). Once both are complete, a distribution
// stage feeds one element per clock to two pipelined multipliers (5 cycles)
// whose products go straight into one pipelined adder (7 cycles). Oex then
// carries the 9 results on 9 consecutive clocks with clk_enable_Oex high,
// the first one 13 clocks after the edge that took the last input word: one
// clock in the distribution stage, then 5 + 7 in the arithmetic pipeline.
// The structure (input store, distribution, 2 multipliers and 1 adder, 12
// cycles of arithmetic latency, one result per clock) follows the original
// design; the word order of the input streams is this design's own choice.
// A new frame
// may be loaded once the previous one has been issued.
module oex
  import fp_pkg::*;
#(
  parameter int unsigned N_CV = 6,   // states of the constant-velocity model
  parameter int unsigned N_CA = 9    // states of the constant-acceleration model
) (
  input  logic  clk,
  input  logic  rst,
  input  fp32_t Mp,
  input  logic  clk_enable_Mp,
  input  fp32_t Usx,
  input  logic  clk_enable_Usx,
  output fp32_t Oex,
  output logic  clk_enable_Oex
);
  localparam int unsigned N_USX = N_CV + N_CA;

  fp32_t                      usx_mem [N_USX];
  fp32_t                      mp_mem  [2];
  logic [$clog2(N_USX+1)-1:0] usx_cnt;
  logic [1:0]                 mp_cnt;
  logic [$clog2(N_CA+1)-1:0]  idx;
  logic                       issuing;

  wire usx_done = (usx_cnt == ($bits(usx_cnt))'(N_USX));
  wire mp_done  = (mp_cnt == 2'd2);

  // input store
  always_ff @(posedge clk) begin
    if (rst) begin
      usx_cnt <= '0;
      mp_cnt  <= '0;
      issuing <= 1'b0;
      idx     <= '0;
    end else begin
      if (clk_enable_Usx && !usx_done) begin
        usx_mem[usx_cnt] <= Usx;
        usx_cnt          <= usx_cnt + 1'b1;
      end
      if (clk_enable_Mp && !mp_done) begin
        mp_mem[mp_cnt[0]] <= Mp;
        mp_cnt            <= mp_cnt + 1'b1;
      end
      // start issuing on the clock after both stores are full
      if (!issuing && usx_done && mp_done) begin
        issuing <= 1'b1;
        idx     <= '0;
      end else if (issuing) begin
        if (idx == ($bits(idx))'(N_CA - 1)) begin
          issuing <= 1'b0;
          usx_cnt <= '0;
          mp_cnt  <= '0;
        end
        idx <= idx + 1'b1;
      end
    end
  end

  // data distribution: element idx of both models and the two probabilities
  fp32_t a1, b1, a2, b2;
  logic  mul_v;
  always_comb begin
    mul_v     = issuing;
    a1 = FP_ZERO; b1 = FP_ZERO; a2 = FP_ZERO; b2 = FP_ZERO;
    if (issuing) begin
      a1 = (idx < ($bits(idx))'(N_CV)) ? usx_mem[idx] : FP_ZERO;
      b1 = mp_mem[0];
      a2 = usx_mem[N_CV + int'(idx)];
      b2 = mp_mem[1];
    end
  end

  fp32_t p1, p2;
  logic  p1_v, p2_v;
  fp_mul #(.LAT(5)) u_mul1 (.clk, .rst, .in_valid(mul_v), .a(a1), .b(b1), .out_valid(p1_v), .y(p1));
  fp_mul #(.LAT(5)) u_mul2 (.clk, .rst, .in_valid(mul_v), .a(a2), .b(b2), .out_valid(p2_v), .y(p2));
  fp_addsub #(.LAT(7)) u_add (.clk, .rst, .in_valid(p1_v & p2_v), .a(p1), .b(p2), .sub(1'b0),
                              .out_valid(clk_enable_Oex), .y(Oex));

endmodule
