// mat_inv3: inverse and determinant of the 3x3 residual covariance S of one
// model, by cofactors:
//   C[i][j] = S[i1][j1]*S[i2][j2] - S[i1][j2]*S[i2][j1]
//             with i1 = (i+1) mod 3, i2 = (i+2) mod 3 (same for j), which
//             gives the signed cofactor directly
//   det     = S[0][0]*C[0][0] + S[0][1]*C[0][1] + S[0][2]*C[0][2]
//   Sinv    = C' / det
//
// Interface: S carries 9 words, row-major, while clk_enable_S is high. The
// module then runs four phases, each on its own pipelined units:
//   cofactors  9 issued on consecutive clocks to 2 multipliers (5 cycles)
//              and a subtractor (7 cycles)
//   determinant  one row through 3 multipliers, an adder for the first two
//              products and a second adder after a 7-cycle delay of the
//              third (19 cycles)
//   reciprocal 1/det on the divider (6 cycles)
//   scaling    9 products C[j][i] * (1/det) on one multiplier (5 cycles)
// det leaves with clk_enable_det high for one clock as soon as it is known;
// Sinv then carries 9 words, row-major, on consecutive clocks with
// clk_enable_Sinv high. From the edge that took the last S word, det comes
// 41 clocks later and the first Sinv word 54 clocks later. The next matrix
// may be sent once the last Sinv word has come out. A singular S gives an
// infinite reciprocal; the filter keeps S positive definite.
//
// The function (inverse and determinant of S for the likelihood) is the
// filter's; the cofactor method, the phase schedule and the unit count are
// this design's own choices.
module mat_inv3
  import fp_pkg::*;
(
  input  logic  clk,
  input  logic  rst,
  input  fp32_t S,
  input  logic  clk_enable_S,
  output fp32_t Sinv,
  output logic  clk_enable_Sinv,
  output fp32_t det,
  output logic  clk_enable_det
);
  typedef enum logic [2:0] {P_LOAD, P_COF, P_WCOF, P_DET, P_WDET, P_DIV, P_WDIV, P_SCALE} phase_t;
  phase_t ph;

  fp32_t      m [9];
  fp32_t      c [9];
  fp32_t      rdet;
  logic [3:0] in_cnt, k, c_cnt;

  // cofactor issue
  fp32_t ca, cb, cc, cd;
  always_comb begin
    int i, j, i1, i2, j1, j2;
    i  = int'(k) / 3;
    j  = int'(k) % 3;
    i1 = (i + 1) % 3;
    i2 = (i + 2) % 3;
    j1 = (j + 1) % 3;
    j2 = (j + 2) % 3;
    ca = m[3 * i1 + j1];
    cb = m[3 * i2 + j2];
    cc = m[3 * i1 + j2];
    cd = m[3 * i2 + j1];
  end

  wire cof_go = (ph == P_COF);
  fp32_t pab, pcd, cof;
  logic  pab_v, pcd_v, cof_v;
  fp_mul #(.LAT(5)) u_mul_ab (.clk, .rst, .in_valid(cof_go), .a(ca), .b(cb), .out_valid(pab_v), .y(pab));
  fp_mul #(.LAT(5)) u_mul_cd (.clk, .rst, .in_valid(cof_go), .a(cc), .b(cd), .out_valid(pcd_v), .y(pcd));
  fp_addsub #(.LAT(7)) u_sub (.clk, .rst, .in_valid(pab_v & pcd_v), .a(pab), .b(pcd), .sub(1'b1),
                              .out_valid(cof_v), .y(cof));

  // determinant: first row of S against the first row of cofactors
  wire det_go = (ph == P_DET);
  fp32_t d0, d1, d2, s01, d2_d;
  logic  d0_v, d1_v, d2_v, s01_v, d2_d_v;
  fp_mul #(.LAT(5)) u_mul_d0 (.clk, .rst, .in_valid(det_go), .a(m[0]), .b(c[0]), .out_valid(d0_v), .y(d0));
  fp_mul #(.LAT(5)) u_mul_d1 (.clk, .rst, .in_valid(det_go), .a(m[1]), .b(c[1]), .out_valid(d1_v), .y(d1));
  fp_mul #(.LAT(5)) u_mul_d2 (.clk, .rst, .in_valid(det_go), .a(m[2]), .b(c[2]), .out_valid(d2_v), .y(d2));
  fp_addsub #(.LAT(7)) u_add_d01 (.clk, .rst, .in_valid(d0_v & d1_v), .a(d0), .b(d1), .sub(1'b0),
                                  .out_valid(s01_v), .y(s01));
  fp_delay #(.WIDTH(32), .LAT(7)) u_dly_d2 (.clk, .rst, .in_valid(d2_v), .in_data(d2),
                                            .out_valid(d2_d_v), .out_data(d2_d));
  fp_addsub #(.LAT(7)) u_add_d (.clk, .rst, .in_valid(s01_v & d2_d_v), .a(s01), .b(d2_d), .sub(1'b0),
                                .out_valid(clk_enable_det), .y(det));

  // reciprocal of the determinant
  fp32_t det_q, rd;
  logic  rd_v;
  fp_div #(.LAT(6)) u_div (.clk, .rst, .in_valid(ph == P_DIV), .a(FP_ONE), .b(det_q),
                           .out_valid(rd_v), .y(rd));

  // scaling of the transposed cofactors
  fp32_t adj;
  always_comb adj = c[3 * (int'(k) % 3) + int'(k) / 3];
  fp_mul #(.LAT(5)) u_mul_s (.clk, .rst, .in_valid(ph == P_SCALE), .a(adj), .b(rdet),
                             .out_valid(clk_enable_Sinv), .y(Sinv));

  always_ff @(posedge clk) begin
    if (rst) begin
      ph     <= P_LOAD;
      in_cnt <= '0;
      k      <= '0;
      c_cnt  <= '0;
    end else begin
      if (cof_v) begin
        c[c_cnt] <= cof;
        c_cnt    <= c_cnt + 4'd1;
      end
      unique case (ph)
        P_LOAD: begin
          if (clk_enable_S) begin
            m[in_cnt] <= S;
            in_cnt    <= in_cnt + 4'd1;
            if (in_cnt == 4'd8) begin
              ph    <= P_COF;
              k     <= '0;
              c_cnt <= '0;
            end
          end
        end
        P_COF: begin
          k <= k + 4'd1;
          if (k == 4'd8) ph <= P_WCOF;
        end
        P_WCOF:  if (c_cnt == 4'd9) ph <= P_DET;
        P_DET:   ph <= P_WDET;
        P_WDET: begin
          if (clk_enable_det) begin
            det_q <= det;
            ph    <= P_DIV;
          end
        end
        P_DIV:   ph <= P_WDIV;
        P_WDIV: begin
          if (rd_v) begin
            rdet <= rd;
            k    <= '0;
            ph   <= P_SCALE;
          end
        end
        P_SCALE: begin
          k <= k + 4'd1;
          if (k == 4'd8) begin
            ph     <= P_LOAD;
            in_cnt <= '0;
          end
        end
        default: ph <= P_LOAD;
      endcase
    end
  end
endmodule
