// tb_plus_ctrl: groups of 1 to 12 random values, with idle gaps, into
// PlusCtrl. After the value marked last, exactly one output must appear
// one cycle later holding the float32 running sum (rounded after every
// addition, in arrival order), and the accumulator must restart.
`timescale 1ns/1ps
module tb_plus_ctrl;
  localparam int WATCHDOG = 4000;
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
  logic [31:0] exp_q [$];
  plus_ctrl dut (.clk, .rst_n, .in_bus, .out_bus);

  always @(negedge clk) if (rst_n && out_bus.en) begin
    check(exp_q.size() > 0 && out_bus.last, "unexpected output");
    if (exp_q.size() > 0) begin
      logic [31:0] e;
      e = exp_q.pop_front();
      check(out_bus.val == e, $sformatf("got %h want %h", out_bus.val, e));
    end
  end

  initial begin
    in_bus = VB_IDLE;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    for (int g = 0; g < 100; g++) begin
      int n;
      logic [31:0] acc;
      n = 1 + int'($urandom % 12);
      acc = 32'h0;
      for (int i = 0; i < n; i++) begin
        @(negedge clk);
        in_bus = '{en: 1'b1, last: (i == n - 1), val: rnd_fp(10.0)};
        acc = ref_add(acc, in_bus.val);
        if ($urandom % 3 == 0) begin
          @(negedge clk);
          in_bus = VB_IDLE;
        end
      end
      exp_q.push_back(acc);
      @(negedge clk);
      in_bus = VB_IDLE;
    end
    repeat (3) @(negedge clk);
    check(exp_q.size() == 0, "sums missing");
    finish_tb();
  end
endmodule
