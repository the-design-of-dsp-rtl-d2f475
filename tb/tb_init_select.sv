// tb_init_select: random data on both inputs, both select values; checks
// that the output follows the selected input.
module tb_init_select;
  logic        sel_loop, init_valid, loop_valid, dout_valid;
  logic [31:0] init_data, loop_data, dout;
  int checks = 0, failures = 0;

  init_select dut (.sel_loop, .init_data, .init_valid, .loop_data, .loop_valid, .dout, .dout_valid);

  initial begin
    for (int t = 0; t < 200; t++) begin
      sel_loop = $urandom % 2; init_valid = $urandom % 2; loop_valid = $urandom % 2;
      init_data = $urandom; loop_data = $urandom;
      #1;
      checks++;
      if (dout !== (sel_loop ? loop_data : init_data) ||
          dout_valid !== (sel_loop ? loop_valid : init_valid)) begin
        failures++;
        $display("FAIL sel=%0d", sel_loop);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100000;
    failures++;
    $display("watchdog timeout");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
