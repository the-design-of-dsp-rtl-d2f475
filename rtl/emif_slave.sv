// emif_slave: the FPGA side of the DSP's asynchronous external memory
// interface (EMIF), through which the DSP writes measurements and initial
// values and reads back the filtered state.
//
// Pins: chip enable ce_n, output enable aoe_n, write strobe awe_n, read
// strobe are_n (all active low, from the DSP), an 8-bit address a, an 8-bit
// data bus split here into d_in (from the pad), d_out and d_oe (to the pad's
// tri-state driver), and five active-low interrupt lines int_n towards the
// DSP. The strobes are asynchronous to the FPGA clock: each goes through a
// two-flip-flop synchroniser and the module acts on its edges.
//
// Write: while ce_n and awe_n are low the address and data bytes are sampled;
// when awe_n rises the byte is committed. Bytes to a word address are
// assembled most significant byte first into 32-bit words, and wr_word_valid
// pulses for one clock with wr_word_addr/wr_word once four bytes to the same
// address have arrived (a byte to a different address restarts assembly).
// Bytes to addresses at or above CTRL_BASE are not assembled: each pulses
// wr_byte_valid with wr_byte_addr/wr_byte.
// Read: when are_n falls while ce_n is low, rd_req pulses with rd_addr; the
// byte rd_data supplied by the surrounding logic is registered onto d_out
// on the next clock. d_oe is high while ce_n and aoe_n are low. The DSP must
// hold its read strobe for at least 5 FPGA clocks.
// Interrupts: int_n is the registered inverse of irq.
//
// The pin set and the byte-wide writes of floating-point words to one
// address, most significant byte first, follow the original design; the
// synchroniser, the byte/word split at CTRL_BASE and the read handshake are
// this design's own.
module emif_slave #(
  parameter logic [7:0] CTRL_BASE = 8'h38
) (
  input  logic        clk,
  input  logic        rst,
  // DSP pins
  input  logic        ce_n,
  input  logic        aoe_n,
  input  logic        awe_n,
  input  logic        are_n,
  input  logic [7:0]  a,
  input  logic [7:0]  d_in,
  output logic [7:0]  d_out,
  output logic        d_oe,
  output logic [4:0]  int_n,
  // internal side
  output logic        wr_word_valid,
  output logic [7:0]  wr_word_addr,
  output logic [31:0] wr_word,
  output logic        wr_byte_valid,
  output logic [7:0]  wr_byte_addr,
  output logic [7:0]  wr_byte,
  output logic        rd_req,
  output logic [7:0]  rd_addr,
  input  logic [7:0]  rd_data,
  input  logic [4:0]  irq
);
  logic [1:0] ce_s, awe_s, are_s;
  logic       awe_q, are_q;
  logic [7:0] a_smp, d_smp;
  logic [1:0] bcnt;
  logic [7:0] cur_addr;
  logic [23:0] hi_bytes;

  wire ce_l   = ~ce_s[1];
  wire awe_l  = ~awe_s[1];
  wire are_l  = ~are_s[1];
  wire wr_end = ~awe_q & awe_s[1];           // rising edge of the write strobe
  wire rd_beg = are_q & ~are_s[1] & ce_l;    // falling edge of the read strobe

  assign d_oe = ~ce_n & ~aoe_n;

  always_ff @(posedge clk) begin
    if (rst) begin
      ce_s          <= 2'b11;
      awe_s         <= 2'b11;
      are_s         <= 2'b11;
      awe_q         <= 1'b1;
      are_q         <= 1'b1;
      bcnt          <= '0;
      cur_addr      <= '0;
      wr_word_valid <= 1'b0;
      wr_byte_valid <= 1'b0;
      rd_req        <= 1'b0;
      int_n         <= '1;
      d_out         <= '0;
    end else begin
      ce_s  <= {ce_s[0], ce_n};
      awe_s <= {awe_s[0], awe_n};
      are_s <= {are_s[0], are_n};
      awe_q <= awe_s[1];
      are_q <= are_s[1];
      int_n <= ~irq;
      wr_word_valid <= 1'b0;
      wr_byte_valid <= 1'b0;
      rd_req        <= rd_beg;
      if (ce_l && awe_l) begin
        a_smp <= a;
        d_smp <= d_in;
      end
      if (wr_end) begin
        if (a_smp >= CTRL_BASE) begin
          wr_byte_valid <= 1'b1;
          wr_byte_addr  <= a_smp;
          wr_byte       <= d_smp;
        end else begin
          cur_addr <= a_smp;
          if (a_smp != cur_addr || bcnt == 2'd0) begin
            hi_bytes <= {16'd0, d_smp};
            bcnt     <= 2'd1;
          end else if (bcnt == 2'd3) begin
            wr_word_valid <= 1'b1;
            wr_word_addr  <= a_smp;
            wr_word       <= {hi_bytes, d_smp};
            bcnt          <= 2'd0;
          end else begin
            hi_bytes <= {hi_bytes[15:0], d_smp};
            bcnt     <= bcnt + 2'd1;
          end
        end
      end
      if (rd_beg) rd_addr <= a;
      if (rd_req) d_out   <= rd_data;
    end
  end

  // a read and a write strobe are never active together on this bus
  assert property (@(posedge clk) disable iff (rst) !(awe_l && are_l))
    else $error("emif_slave: read and write strobes both active");
endmodule
