// tb_emif_slave: drives the EMIF slave through the DSP bus model. Writes
// random 32-bit words to word addresses (checking assembly, most significant
// byte first, and that an address change restarts a word), single bytes to
// control addresses, reads bytes (checking rd_addr, the byte returned on the
// bus and the output enable) and toggles the interrupt requests.
module tb_emif_slave;
  logic clk = 0, rst = 1;
  always #5 clk = ~clk;

  logic       ce_n, aoe_n, awe_n, are_n, d_oe;
  logic [7:0] a, d_bus, d_out;
  logic [4:0] int_n, irq;
  logic       wv, bv, rd_req;
  logic [7:0] wa, ba, bd, rd_addr, rd_data;
  logic [31:0] wd;
  int checks = 0, failures = 0;
  logic [7:0]  exp_waddr[$];
  logic [31:0] exp_word[$];
  logic [7:0]  exp_baddr[$], exp_byte[$];
  int n_rdreq = 0;

  dsp_emif_bfm bfm (.clk, .ce_n, .aoe_n, .awe_n, .are_n, .a, .d(d_bus), .d_from_fpga(d_out), .d_oe);
  emif_slave dut (.clk, .rst, .ce_n, .aoe_n, .awe_n, .are_n, .a, .d_in(d_bus), .d_out, .d_oe, .int_n,
                  .wr_word_valid(wv), .wr_word_addr(wa), .wr_word(wd),
                  .wr_byte_valid(bv), .wr_byte_addr(ba), .wr_byte(bd),
                  .rd_req, .rd_addr, .rd_data, .irq);

  assign rd_data = rd_addr ^ 8'h5A;

  task automatic chk(input string what, input bit ok);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s", what);
    end
  endtask

  always @(posedge clk) if (!rst) begin
    if (wv) begin
      chk("unexpected word", exp_word.size() != 0);
      if (exp_word.size() != 0) begin
        chk($sformatf("word %h at %h", wd, wa), wd == exp_word.pop_front() && wa == exp_waddr.pop_front());
      end
    end
    if (bv) begin
      chk("unexpected byte", exp_byte.size() != 0);
      if (exp_byte.size() != 0) chk($sformatf("byte %h at %h", bd, ba), bd == exp_byte.pop_front() && ba == exp_baddr.pop_front());
    end
    if (rd_req) n_rdreq++;
  end

  initial begin
    logic [31:0] w;
    logic [7:0]  b;
    bit          dr;
    irq = 0;
    repeat (3) @(posedge clk);
    @(negedge clk) rst = 0;
    // the word of the write sequence shown for this bus: 43 33 18 B0 to 0x28
    exp_word.push_back(32'h4333_18B0); exp_waddr.push_back(8'h28);
    bfm.write_word(8'h28, 32'h4333_18B0);
    for (int t = 0; t < 10; t++) begin
      logic [7:0] ad;
      ad = 8'h20 + 8'(4 * ($urandom % 6));
      w = $urandom;
      exp_word.push_back(w); exp_waddr.push_back(ad);
      bfm.write_word(ad, w);
    end
    // an interrupted word: two bytes to 0x20, then a full word to 0x24
    bfm.write_byte(8'h20, 8'hAA);
    bfm.write_byte(8'h20, 8'hBB);
    exp_word.push_back(32'h1122_3344); exp_waddr.push_back(8'h24);
    bfm.write_word(8'h24, 32'h1122_3344);
    for (int t = 0; t < 5; t++) begin
      b = $urandom;
      exp_byte.push_back(b); exp_baddr.push_back(8'h38);
      bfm.write_byte(8'h38, b);
    end
    repeat (4) @(posedge clk);
    chk("all words seen", exp_word.size() == 0);
    chk("all bytes seen", exp_byte.size() == 0);
    for (int t = 0; t < 6; t++) begin
      logic [7:0] ad;
      ad = 8'h40 + 8'(t);
      bfm.read_byte(ad, b, dr);
      chk($sformatf("read %h at %h", b, ad), b == (ad ^ 8'h5A) && dr);
    end
    chk($sformatf("rd_req count %0d", n_rdreq), n_rdreq == 6);
    chk("bus released", !d_oe);
    for (int t = 0; t < 8; t++) begin
      irq = 5'($urandom);
      repeat (2) @(posedge clk);
      #1 chk("int_n", int_n == ~irq);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog timeout");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
