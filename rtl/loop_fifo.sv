// loop_fifo: first-in first-out store for the values one frame of the filter
// hands to the next: the updated states, the updated error covariances and
// the updated model probabilities each have one.
//
// A word on din is written on every clock with wr_en high; a word is read
// on every clock with rd_en high and appears on dout with dout_valid one
// clock later (a synchronous-read memory). Writes to a full FIFO and reads of
// an empty one are ignored. count gives the number of words held. The use
// (three FIFOs closing the filter loop) follows the original design, which
// takes the FIFO from the vendor library; depth and read timing are this
// design's choice. DEPTH must be a power of two.
module loop_fifo
  import fp_pkg::*;
#(
  parameter int unsigned DEPTH = 16
) (
  input  logic                     clk,
  input  logic                     rst,
  input  logic                     wr_en,
  input  fp32_t                    din,
  input  logic                     rd_en,
  output fp32_t                    dout,
  output logic                     dout_valid,
  output logic [$clog2(DEPTH):0]   count,
  output logic                     full,
  output logic                     empty
);
  localparam int unsigned AW = $clog2(DEPTH);

  fp32_t         mem [DEPTH];
  logic [AW-1:0] wp, rp;

  assign full  = (count == (AW+1)'(DEPTH));
  assign empty = (count == '0);

  wire do_wr = wr_en && !full;
  wire do_rd = rd_en && !empty;

  always_ff @(posedge clk) begin
    if (do_wr) mem[wp] <= din;
    if (do_rd) dout <= mem[rp];
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      wp         <= '0;
      rp         <= '0;
      count      <= '0;
      dout_valid <= 1'b0;
    end else begin
      dout_valid <= do_rd;
      if (do_wr) wp <= wp + 1'b1;
      if (do_rd) rp <= rp + 1'b1;
      count <= count + (AW+1)'(do_wr) - (AW+1)'(do_rd);
    end
  end

  // a write into a full FIFO loses data: the filter loop never does this
  assert property (@(posedge clk) disable iff (rst) !(wr_en && full))
    else $error("loop_fifo: write while full");
endmodule
