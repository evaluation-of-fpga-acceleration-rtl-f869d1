// tb_relu_11: relu2 (one sequential lane). Random values of both signs,
// including -0.0, must come out one cycle later as max(0, x) (+0.0 for a
// set sign bit), with enable and last passed on.
`timescale 1ns/1ps
module tb_relu_11;
  localparam int WATCHDOG = 2000;
  import cnn_pkg::*;
  import tb_pkg::*;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  int   checks = 0;
  int   failures = 0;
  int   cycle = 0;

  always #5 clk = ~clk;
  always @(posedge clk) cycle <= cycle + 1;

  task automatic check(input bit ok, input string msg);
    checks++;
    if (!ok) begin
      failures++;
      if (failures <= 10) $display("FAIL @%0d: %s", cycle, msg);
    end
  endtask

  task automatic finish_tb();
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  endtask

  initial begin
    repeat (WATCHDOG) @(posedge clk);
    failures++;
    $display("FAIL: watchdog expired");
    finish_tb();
  end

  value_bus_t in_bus, out_bus;
  relu_11 dut (.clk, .rst_n, .in_bus, .out_bus);
  initial begin
    value_bus_t sent;
    in_bus = VB_IDLE;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    for (int i = 0; i < 400; i++) begin
      real r;
      @(negedge clk);
      in_bus = '{en: ($urandom % 5 != 0), last: ($urandom % 9 == 0),
                 val: (i % 50 == 0) ? 32'h8000_0000 : rnd_fp(3.0)};
      sent = in_bus;
      @(posedge clk);
      #1;
      r = f2r(sent.val);
      check(out_bus.en == sent.en && out_bus.last == sent.last, "flags");
      check(out_bus.val == ((sent.val[31]) ? 32'h0 : sent.val) && f2r(out_bus.val) == ((r > 0.0) ? r : 0.0),
            $sformatf("in %h out %h", sent.val, out_bus.val));
    end
    finish_tb();
  end
endmodule
