// tb_conv_kernel_type01: windows of 1 to 25 random value/weight pairs into
// ConvKernel_type01. Each result must match the double-precision
// sum-product to float32 accuracy and appear 2 cycles after the last slot.
`timescale 1ns/1ps
module tb_conv_kernel_type01;
  localparam int WATCHDOG = 5000;
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

  value_bus_t in_val, in_wt, out_bus;
  real want_q [$], mag_q [$];
  int due_q [$];
  conv_kernel_type01 dut (.clk, .rst_n, .in_val, .in_wt, .out_bus);

  always @(negedge clk) if (rst_n && out_bus.en) begin
    check(want_q.size() > 0, "unexpected output");
    if (want_q.size() > 0) begin
      real wv, mg;
      int due;
      wv = want_q.pop_front(); mg = mag_q.pop_front(); due = due_q.pop_front();
      check(near(out_bus.val, wv, 1e-6, mg), $sformatf("got %f want %f", f2r(out_bus.val), wv));
      check(cycle == due, "latency");
    end
  end

  initial begin
    in_val = VB_IDLE; in_wt = VB_IDLE;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    for (int win = 0; win < 60; win++) begin
      int n;
      real acc, mag, t;
      n = 1 + int'($urandom % 25);
      acc = 0.0; mag = 1e-30;
      for (int k = 0; k < n; k++) begin
        @(negedge clk);
        in_val = '{en: 1'b1, last: (k == n - 1), val: rnd_fp(8.0)};
        in_wt  = '{en: 1'b1, last: (k == n - 1), val: rnd_fp(1.0)};
        t = f2r(in_val.val) * f2r(in_wt.val);
        acc += t; mag += (t < 0.0) ? -t : t;
      end
      want_q.push_back(acc); mag_q.push_back(mag); due_q.push_back(cycle + 2);
      if (win % 2 == 0) begin
        @(negedge clk);
        in_val = VB_IDLE; in_wt = VB_IDLE;
      end
    end
    @(negedge clk);
    in_val = VB_IDLE; in_wt = VB_IDLE;
    repeat (5) @(negedge clk);
    check(want_q.size() == 0, "results missing");
    finish_tb();
  end
endmodule
