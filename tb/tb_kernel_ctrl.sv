// tb_kernel_ctrl: loads 9 weights of a 3x3 kernel (plus writes to
// neighbouring addresses that must be ignored) and feeds windows as pairs
// (slots 0/1, 2/3, 4/5, 6/7, 8/pad). Each branch must show the value with
// its own weight one cycle later, the pad slot weight +0.0, and the slot
// counter must restart after every window.
`timescale 1ns/1ps
module tb_kernel_ctrl;
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

  value_bus_t in_a, in_b, a_val, a_wt, b_val, b_wt;
  logic cfg_we;
  logic [11:0] cfg_addr;
  logic [31:0] cfg_data;
  logic [31:0] w [9];
  kernel_ctrl #(.K(3), .BASE(20)) dut (.clk, .rst_n, .in_a, .in_b, .a_val, .a_wt, .b_val, .b_wt,
                                      .cfg_we, .cfg_addr, .cfg_data);
  initial begin
    in_a = VB_IDLE; in_b = VB_IDLE; cfg_we = 0; cfg_addr = 0; cfg_data = 0;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    for (int k = -1; k <= 9; k++) begin
      @(negedge clk);
      cfg_we = 1; cfg_addr = 12'(20 + k); cfg_data = rnd_fp(1.0);
      if (k >= 0 && k < 9) w[k] = cfg_data;
    end
    @(negedge clk); cfg_we = 0;
    for (int win = 0; win < 20; win++) begin
      for (int p = 0; p < 5; p++) begin
        logic [31:0] va, vb;
        @(negedge clk);
        va = rnd_fp(4.0); vb = rnd_fp(4.0);
        in_a = '{en: 1'b1, last: (p == 4), val: va};
        in_b = '{en: 1'b1, last: (p == 4), val: vb};
        @(negedge clk);
        in_a = VB_IDLE; in_b = VB_IDLE;
        check(a_val.en && a_val.val == va && a_val.last == (p == 4), "branch A value");
        check(a_wt.en && a_wt.val == w[2 * p], $sformatf("branch A weight slot %0d", 2 * p));
        check(b_val.en && b_val.val == vb, "branch B value");
        check(b_wt.val == ((p < 4) ? w[2 * p + 1] : 32'h0), $sformatf("branch B weight slot %0d", 2 * p + 1));
        if (win % 2 == 1) @(negedge clk);
      end
    end
    finish_tb();
  end
endmodule
