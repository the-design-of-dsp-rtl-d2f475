// tb_loop_fifo: random pushes and pops against a queue model, including
// attempts to read when empty; checks data order, dout_valid timing, count,
// full and empty.
module tb_loop_fifo;
  localparam int DEPTH = 8;
  logic clk = 0, rst = 1;
  always #5 clk = ~clk;

  logic        wr_en, rd_en, dout_valid, full, empty;
  logic [31:0] din, dout;
  logic [3:0]  count;
  int checks = 0, failures = 0;
  logic [31:0] model[$];
  logic [31:0] expect_q[$];
  bit          rd_pending;

  loop_fifo #(.DEPTH(DEPTH)) dut (.clk, .rst, .wr_en, .din, .rd_en, .dout, .dout_valid,
                                  .count, .full, .empty);

  task automatic chk(input string what, input bit ok);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s", what);
    end
  endtask

  initial begin
    wr_en = 0; rd_en = 0; din = 0; rd_pending = 0;
    repeat (3) @(posedge clk);
    @(negedge clk) rst = 0;
    for (int t = 0; t < 400; t++) begin
      @(negedge clk);
      // check state left by the previous edge
      chk("count", count == 4'(model.size()));
      chk("full", full == (model.size() == DEPTH));
      chk("empty", empty == (model.size() == 0));
      chk("dout_valid", dout_valid == rd_pending);
      if (rd_pending) chk($sformatf("data %h", dout), dout == expect_q.pop_front());
      // next operation; never write into a full FIFO
      wr_en = ($urandom % 3 != 0) && (t < 200 || $urandom % 2) && !(model.size() == DEPTH && !(rd_en));
      rd_en = ($urandom % 2) || t > 300;
      if (model.size() == DEPTH) wr_en = 0;
      din = $urandom;
      rd_pending = rd_en && model.size() != 0;
      if (rd_pending) expect_q.push_back(model.pop_front());
      if (wr_en) model.push_back(din);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("watchdog timeout");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
