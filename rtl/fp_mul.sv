// fp_mul: pipelined IEEE-754 single-precision multiplier, y = a * b.
//
// The result is computed by the shared fp_pkg function and carried through
// LAT registers (fp_delay), so a new operation can start every clock and
// y/out_valid appear exactly LAT rising edges after the edge that took
// a, b with in_valid high. A synthesis tool can retime the registers into
// the arithmetic. The 5-cycle latency is the setting the design uses for its library multiplier.
module fp_mul
  import fp_pkg::*;
#(
  parameter int unsigned LAT = 5
) (
  input  logic        clk,
  input  logic        rst,
  input  logic        in_valid,
  input  fp32_t       a,
  input  fp32_t       b,
  output logic        out_valid,
  output fp32_t       y
);
  fp32_t r;
  always_comb r = fp_mul(a, b);

  fp_delay #(.WIDTH(32), .LAT(LAT)) u_pipe (
    .clk, .rst, .in_valid, .in_data(r), .out_valid, .out_data(y)
  );
endmodule
