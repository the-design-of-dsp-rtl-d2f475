// fp_addsub: pipelined IEEE-754 single-precision adder/subtractor, y = a + b (a - b when sub is set).
//
// The result is computed by the shared fp_pkg function and carried through
// LAT registers (fp_delay), so a new operation can start every clock and
// y/out_valid appear exactly LAT rising edges after the edge that took
// a, b with in_valid high. A synthesis tool can retime the registers into
// the arithmetic. The 7-cycle latency is the setting the design uses for its library adder.
module fp_addsub
  import fp_pkg::*;
#(
  parameter int unsigned LAT = 7
) (
  input  logic        clk,
  input  logic        rst,
  input  logic        in_valid,
  input  fp32_t       a,
  input  fp32_t       b,
  input  logic        sub,
  output logic        out_valid,
  output fp32_t       y
);
  fp32_t r;
  always_comb r = fp_add(a, b, sub);

  fp_delay #(.WIDTH(32), .LAT(LAT)) u_pipe (
    .clk, .rst, .in_valid, .in_data(r), .out_valid, .out_data(y)
  );
endmodule
