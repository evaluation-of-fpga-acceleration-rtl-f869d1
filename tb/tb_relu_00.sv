// tb_relu_00: relu1 (3 lanes). Random values of both signs, including -0.0,
// must come out one cycle later as max(0, x), with +0.0 for every value
// whose sign bit is set, and last passed on.
`timescale 1ns/1ps
module tb_relu_00;
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

  localparam int LANES = 3;
  value_bus_t in_bus [LANES];
  value_bus_t out_bus [LANES];
  relu_00 #(.LANES(LANES)) dut (.clk, .rst_n, .in_bus, .out_bus);
  initial begin
    value_bus_t sent [LANES];
    for (int c = 0; c < LANES; c++) in_bus[c] = VB_IDLE;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    for (int i = 0; i < 300; i++) begin
      @(negedge clk);
      for (int c = 0; c < LANES; c++) begin
        in_bus[c] = '{en: ($urandom % 5 != 0), last: ($urandom % 9 == 0),
                      val: (i % 50 == 0) ? 32'h8000_0000 : rnd_fp(3.0)};
        sent[c] = in_bus[c];
      end
      @(posedge clk);
      #1;
      for (int c = 0; c < LANES; c++) begin
        real r;
        r = f2r(sent[c].val);
        check(out_bus[c].en == sent[c].en && out_bus[c].last == sent[c].last, "flags");
        check(out_bus[c].val == ((sent[c].val[31]) ? 32'h0 : sent[c].val) && f2r(out_bus[c].val) == ((r > 0.0) ? r : 0.0),
              $sformatf("lane %0d in %h out %h", c, sent[c].val, out_bus[c].val));
      end
    end
    finish_tb();
  end
endmodule
