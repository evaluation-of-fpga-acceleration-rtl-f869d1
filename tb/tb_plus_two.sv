// tb_plus_two: random operand pairs into PlusTwo; each sum must equal the
// correctly rounded float32 sum, one cycle later, with in_a's last flag.
// Operands include near-cancelling pairs.
`timescale 1ns/1ps
module tb_plus_two;
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

  value_bus_t in_a, in_b, out_bus;
  logic [33:0] exp_q [$];
  plus_two dut (.clk, .rst_n, .in_a, .in_b, .out_bus);

  always @(negedge clk) if (rst_n && out_bus.en) begin
    check(exp_q.size() > 0, "unexpected output");
    if (exp_q.size() > 0) begin
      logic [33:0] e;
      e = exp_q.pop_front();
      check({out_bus.last, out_bus.val} == {e[32], e[31:0]}, $sformatf("got %h want %h", out_bus.val, e[31:0]));
    end
  end

  initial begin
    in_a = VB_IDLE; in_b = VB_IDLE;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    for (int i = 0; i < 500; i++) begin
      @(negedge clk);
      in_a = '{en: ($urandom % 4 != 0), last: ($urandom % 3 == 0), val: rnd_fp(100.0)};
      in_b = '{en: in_a.en, last: 1'b0, val: (i % 3 == 0) ? {~in_a.val[31], in_a.val[30:4], 4'($urandom)} : rnd_fp(1.0)};
      if (in_a.en) exp_q.push_back({1'b1, in_a.last, ref_add(in_a.val, in_b.val)});
    end
    @(negedge clk);
    in_a = VB_IDLE; in_b = VB_IDLE;
    repeat (3) @(negedge clk);
    check(exp_q.size() == 0, "sums missing");
    finish_tb();
  end
endmodule
