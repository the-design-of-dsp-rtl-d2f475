// dsp_emif_bfm: behavioural model of the DSP's asynchronous external memory
// interface as seen by the FPGA, for testbenches. Its tasks write and read
// single bytes and write 32-bit words most significant byte first. Timing of
// one access, in periods of clk: setup 2 (ce_n low, address and data on the
// bus), strobe STROBE (awe_n or are_n, with aoe_n for reads, low), hold 2.
module dsp_emif_bfm #(
  parameter int STROBE = 6
) (
  input  logic       clk,
  output logic       ce_n,
  output logic       aoe_n,
  output logic       awe_n,
  output logic       are_n,
  output logic [7:0] a,
  output logic [7:0] d,
  input  logic [7:0] d_from_fpga,
  input  logic       d_oe
);
  initial begin
    ce_n = 1; aoe_n = 1; awe_n = 1; are_n = 1; a = 0; d = 0;
  end

  task automatic write_byte(input logic [7:0] addr, input logic [7:0] data);
    @(negedge clk) ce_n = 0; a = addr; d = data;
    repeat (2) @(negedge clk);
    awe_n = 0;
    repeat (STROBE) @(negedge clk);
    awe_n = 1;
    repeat (2) @(negedge clk);
    ce_n = 1; a = 0;
    repeat (2) @(negedge clk);
  endtask

  task automatic write_word(input logic [7:0] addr, input logic [31:0] data);
    for (int i = 3; i >= 0; i--) write_byte(addr, data[8*i +: 8]);
  endtask

  task automatic read_byte(input logic [7:0] addr, output logic [7:0] data, output bit driven);
    @(negedge clk) ce_n = 0; a = addr;
    repeat (2) @(negedge clk);
    are_n = 0; aoe_n = 0;
    repeat (STROBE) @(negedge clk);
    data   = d_from_fpga;
    driven = d_oe;
    are_n = 1; aoe_n = 1;
    repeat (2) @(negedge clk);
    ce_n = 1; a = 0;
    repeat (2) @(negedge clk);
  endtask

  task automatic read_word(input logic [7:0] addr, output logic [31:0] data, output bit driven);
    logic [7:0] b;
    bit         dr;
    driven = 1;
    for (int i = 3; i >= 0; i--) begin
      read_byte(addr, b, dr);
      data[8*i +: 8] = b;
      driven &= dr;
    end
  endtask
endmodule
