// tb_conv_kernel_type00: random 3x3 weights and windows streamed as pairs
// into ConvKernel_type00, back to back and with gaps. Each result must
// match the double-precision sum-product to float32 accuracy and appear
// 4 cycles after the window's last pair.
`timescale 1ns/1ps
module tb_conv_kernel_type00;
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

  value_bus_t in_a, in_b, out_bus;
  logic cfg_we;
  logic [11:0] cfg_addr;
  logic [31:0] cfg_data;
  logic [31:0] w [9];
  real want_q [$], mag_q [$];
  int due_q [$];
  conv_kernel_type00 #(.K(3), .BASE(0)) dut (.clk, .rst_n, .in_a, .in_b, .out_bus, .cfg_we, .cfg_addr, .cfg_data);

  always @(negedge clk) if (rst_n && out_bus.en) begin
    check(want_q.size() > 0, "unexpected output");
    if (want_q.size() > 0) begin
      real wv, mg;
      int due;
      wv = want_q.pop_front(); mg = mag_q.pop_front(); due = due_q.pop_front();
      check(near(out_bus.val, wv, 1e-6, mg), $sformatf("got %f want %f", f2r(out_bus.val), wv));
      check(cycle == due, $sformatf("latency: at %0d want %0d", cycle, due));
    end
  end

  initial begin
    in_a = VB_IDLE; in_b = VB_IDLE; cfg_we = 0; cfg_addr = 0; cfg_data = 0;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    for (int k = 0; k < 9; k++) begin
      @(negedge clk);
      cfg_we = 1; cfg_addr = 12'(k); cfg_data = rnd_fp(1.0); w[k] = cfg_data;
    end
    @(negedge clk); cfg_we = 0;
    for (int win = 0; win < 40; win++) begin
      logic [31:0] v [10];
      real acc, mag;
      acc = 0.0; mag = 0.0;
      for (int k = 0; k < 10; k++) v[k] = rnd_fp(8.0);
      for (int k = 0; k < 9; k++) begin
        acc += f2r(v[k]) * f2r(w[k]);
        mag += (f2r(v[k]) * f2r(w[k]) < 0.0) ? -f2r(v[k]) * f2r(w[k]) : f2r(v[k]) * f2r(w[k]);
      end
      for (int p = 0; p < 5; p++) begin
        @(negedge clk);
        in_a = '{en: 1'b1, last: (p == 4), val: v[2 * p]};
        in_b = '{en: 1'b1, last: (p == 4), val: v[2 * p + 1]};
        if (p == 4) begin
          want_q.push_back(acc); mag_q.push_back(mag + 1e-30); due_q.push_back(cycle + 4);
        end
      end
      @(negedge clk);
      in_a = VB_IDLE; in_b = VB_IDLE;
      if (win % 3 == 0) repeat (2) @(negedge clk);
    end
    repeat (8) @(negedge clk);
    check(want_q.size() == 0, "results missing");
    finish_tb();
  end
endmodule
