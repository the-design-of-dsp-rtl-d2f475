// fp_delay: a chain of LAT registers with a valid bit, used as the pipeline
// body of every arithmetic unit and as the "delay registers" that keep an
// operand in step with a result still inside a multiplier or adder.
//
// in_valid/in_data taken at a rising clock edge appear on out_valid/out_data
// LAT edges later. LAT = 0 is a plain wire. Synchronous active-high reset
// clears the valid bits only; data registers are not reset.
module fp_delay #(
  parameter int unsigned WIDTH = 32,
  parameter int unsigned LAT   = 7
) (
  input  logic             clk,
  input  logic             rst,
  input  logic             in_valid,
  input  logic [WIDTH-1:0] in_data,
  output logic             out_valid,
  output logic [WIDTH-1:0] out_data
);
  if (LAT == 0) begin : g_wire
    assign out_valid = in_valid;
    assign out_data  = in_data;
  end else begin : g_regs
    logic [LAT-1:0]            v;
    logic [LAT-1:0][WIDTH-1:0] d;
    always_ff @(posedge clk) begin
      if (rst) v <= '0;
      else begin
        v[0] <= in_valid;
        for (int i = 1; i < LAT; i++) v[i] <= v[i-1];
      end
      d[0] <= in_data;
      for (int i = 1; i < LAT; i++) d[i] <= d[i-1];
    end
    assign out_valid = v[LAT-1];
    assign out_data  = d[LAT-1];
  end
endmodule
