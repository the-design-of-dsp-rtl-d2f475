// fp_exp: pipelined IEEE-754 single-precision exponential unit, y = exp(a).
//
// The result is computed by the shared fp_pkg function and carried through
// LAT registers (fp_delay), so a new operation can start every clock and
// y/out_valid appear exactly LAT rising edges after the edge that took
// a with in_valid high. A synthesis tool can retime the registers into
// the arithmetic. The 17-cycle latency is this design's own choice; no latency is given for the original exponential.
module fp_exp
  import fp_pkg::*;
#(
  parameter int unsigned LAT = 17
) (
  input  logic        clk,
  input  logic        rst,
  input  logic        in_valid,
  input  fp32_t       a,
  output logic        out_valid,
  output fp32_t       y
);
  fp32_t r;
  always_comb r = fp_exp(a);

  fp_delay #(.WIDTH(32), .LAT(LAT)) u_pipe (
    .clk, .rst, .in_valid, .in_data(r), .out_valid, .out_data(y)
  );
endmodule
