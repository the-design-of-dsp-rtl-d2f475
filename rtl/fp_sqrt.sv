// fp_sqrt: pipelined IEEE-754 single-precision square-root unit, y = sqrt(|a|).
//
// The result is computed by the shared fp_pkg function and carried through
// LAT registers (fp_delay), so a new operation can start every clock and
// y/out_valid appear exactly LAT rising edges after the edge that took
// a with in_valid high. A synthesis tool can retime the registers into
// the arithmetic. The 16-cycle latency is the delay the original design matches with registers around its square root.
module fp_sqrt
  import fp_pkg::*;
#(
  parameter int unsigned LAT = 16
) (
  input  logic        clk,
  input  logic        rst,
  input  logic        in_valid,
  input  fp32_t       a,
  output logic        out_valid,
  output fp32_t       y
);
  fp32_t r;
  always_comb r = fp_sqrt(a);

  fp_delay #(.WIDTH(32), .LAT(LAT)) u_pipe (
    .clk, .rst, .in_valid, .in_data(r), .out_valid, .out_data(y)
  );
endmodule
