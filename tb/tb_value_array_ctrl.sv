// tb_value_array_ctrl: sets of N = 3 parallel values into ValueArrayCtrl,
// spaced 3 to 6 cycles apart. The values must come out in lane order on
// the three cycles after the set arrives, last on lane 2 only.
`timescale 1ns/1ps
module tb_value_array_ctrl;
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

  localparam int N = 3;
  value_bus_t in_bus [N];
  value_bus_t out_bus;
  logic [32:0] exp_q [$];
  int set_cycle [$];
  value_array_ctrl #(.N(N)) dut (.clk, .rst_n, .in_bus, .out_bus);

  always @(negedge clk) if (rst_n) begin
    if (out_bus.en) begin
      check(exp_q.size() > 0, "unexpected output");
      if (exp_q.size() > 0) begin
        logic [32:0] e;
        e = exp_q.pop_front();
        check({out_bus.last, out_bus.val} == e, $sformatf("got %b %h want %h", out_bus.last, out_bus.val, e));
      end
    end else begin
      check(exp_q.size() % N == 0, "gap inside a serialised set");
    end
  end

  initial begin
    for (int c = 0; c < N; c++) in_bus[c] = VB_IDLE;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    for (int s = 0; s < 50; s++) begin
      @(negedge clk);
      for (int c = 0; c < N; c++) begin
        in_bus[c] = '{en: 1'b1, last: 1'b1, val: rnd_fp(5.0)};
        exp_q.push_back({(c == N - 1), in_bus[c].val});
      end
      @(negedge clk);
      for (int c = 0; c < N; c++) in_bus[c] = VB_IDLE;
      repeat (2 + $urandom % 4) @(negedge clk);
    end
    repeat (5) @(negedge clk);
    check(exp_q.size() == 0, "outputs missing");
    finish_tb();
  end
endmodule
