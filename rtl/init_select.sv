// init_select: double-selection module. Chooses, for the filter, between the
// initial values that arrive from the DSP with the first frame and the
// values that the previous frame left in its loop FIFO.
//
// sel_loop = 0 passes init_data/init_valid, sel_loop = 1 passes
// loop_data/loop_valid, combinationally. The three instances of the design
// select the state, the error covariance and the model probability. The
// function follows the original design; the select encoding is this
// design's choice.
module init_select
  import fp_pkg::*;
(
  input  logic  sel_loop,
  input  fp32_t init_data,
  input  logic  init_valid,
  input  fp32_t loop_data,
  input  logic  loop_valid,
  output fp32_t dout,
  output logic  dout_valid
);
  always_comb begin
    if (sel_loop) begin
      dout       = loop_data;
      dout_valid = loop_valid;
    end else begin
      dout       = init_data;
      dout_valid = init_valid;
    end
  end
endmodule
