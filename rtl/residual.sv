// residual: measurement residual and its covariance for each of the two
// model-conditioned filters,
//   v_j = Z - H X_j(k|k-1)        S_j = H P_j(k|k-1) H' + R
// with the measurement matrix H = [I3 0] that picks the three positions, so
// that v_j is the converted measurement minus the predicted position and S_j
// is the upper-left 3x3 block of the predicted covariance plus the converted
// measurement covariance R.
//
// Interface (one word per clock, each stream with its own enable):
//   Z   3 words per frame (converted measurement x, y, z)
//   R   9 words per frame, row-major
//   Xp  predicted states: 6 words with clk_enable_Xp1 (model 1), 9 words
//       with clk_enable_Xp2 (model 2); only the first 3 of each are used
//   Pp  9 words per model (upper-left block of the predicted covariance,
//       row-major), model 1 first; model 2's block may be sent once model
//       1's S has started to come out
// Model j is processed when Z, R, its predicted state and its Pp block are
// complete. Its 9 element pairs are then issued on consecutive clocks: the
// first 3 to a pipelined subtractor (7 cycles) for v, all 9 to a pipelined
// adder (7 cycles) for S. v carries 3 words with clk_enable_v high and S 9
// words with clk_enable_S high, from the 8th clock after the edge that
// completed the model's inputs. After model 2, Z and R are released for the
// next frame.
//
// The equations are those of the model probability update of the filter;
// splitting off H as a selection, the streams and the unit count are this
// design's own choices.
module residual
  import fp_pkg::*;
(
  input  logic  clk,
  input  logic  rst,
  input  fp32_t Z,
  input  logic  clk_enable_Z,
  input  fp32_t R,
  input  logic  clk_enable_R,
  input  fp32_t Xp,
  input  logic  clk_enable_Xp1,
  input  logic  clk_enable_Xp2,
  input  fp32_t Pp,
  input  logic  clk_enable_Pp,
  output fp32_t v,
  output logic  clk_enable_v,
  output fp32_t S,
  output logic  clk_enable_S
);
  fp32_t      zm [3];
  fp32_t      rm [9];
  fp32_t      pm [9];
  fp32_t      x1 [3];
  fp32_t      x2 [3];
  logic [1:0] z_cnt;
  logic [3:0] r_cnt, p_cnt, x2_cnt, n;
  logic [2:0] x1_cnt;
  logic       busy, cur;       // cur: model being (or next to be) processed

  wire z_ok  = (z_cnt == 2'd3);
  wire r_ok  = (r_cnt == 4'd9);
  wire p_ok  = (p_cnt == 4'd9);
  wire x1_ok = (x1_cnt == 3'd6);
  wire x2_ok = (x2_cnt == 4'd9);
  wire go    = !busy && z_ok && r_ok && p_ok && (cur ? x2_ok : x1_ok);

  always_ff @(posedge clk) begin
    if (rst) begin
      z_cnt  <= '0;
      r_cnt  <= '0;
      p_cnt  <= '0;
      x1_cnt <= '0;
      x2_cnt <= '0;
      busy   <= 1'b0;
      cur    <= 1'b0;
      n      <= '0;
    end else begin
      if (clk_enable_Z && !z_ok) begin
        zm[z_cnt] <= Z;
        z_cnt     <= z_cnt + 2'd1;
      end
      if (clk_enable_R && !r_ok) begin
        rm[r_cnt] <= R;
        r_cnt     <= r_cnt + 4'd1;
      end
      if (clk_enable_Pp && !p_ok) begin
        pm[p_cnt] <= Pp;
        p_cnt     <= p_cnt + 4'd1;
      end
      if (clk_enable_Xp1 && !x1_ok) begin
        if (x1_cnt < 3'd3) x1[x1_cnt[1:0]] <= Xp;
        x1_cnt <= x1_cnt + 3'd1;
      end
      if (clk_enable_Xp2 && !x2_ok) begin
        if (x2_cnt < 4'd3) x2[x2_cnt[1:0]] <= Xp;
        x2_cnt <= x2_cnt + 4'd1;
      end
      if (go) begin
        busy <= 1'b1;
        n    <= '0;
      end else if (busy) begin
        n <= n + 4'd1;
        if (n == 4'd8) begin
          busy  <= 1'b0;
          p_cnt <= '0;
          cur   <= ~cur;
          if (cur) begin
            x2_cnt <= '0;
            z_cnt  <= '0;
            r_cnt  <= '0;
          end else begin
            x1_cnt <= '0;
          end
        end
      end
    end
  end

  fp32_t za, xb;
  logic  sub_v;
  always_comb begin
    sub_v = busy && n < 4'd3;
    za    = zm[n[1:0] == 2'd3 ? 0 : n[1:0]];
    xb    = cur ? x2[n[1:0] == 2'd3 ? 0 : n[1:0]] : x1[n[1:0] == 2'd3 ? 0 : n[1:0]];
  end

  fp_addsub #(.LAT(7)) u_sub (.clk, .rst, .in_valid(sub_v), .a(za), .b(xb), .sub(1'b1),
                              .out_valid(clk_enable_v), .y(v));
  fp_addsub #(.LAT(7)) u_add (.clk, .rst, .in_valid(busy), .a(pm[n == 4'd9 ? 0 : n]),
                              .b(rm[n == 4'd9 ? 0 : n]), .sub(1'b0),
                              .out_valid(clk_enable_S), .y(S));
endmodule
