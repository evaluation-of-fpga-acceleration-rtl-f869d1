// tb_weight_value: random value/weight pairs, with gaps, into WeightValue;
// each product must equal the correctly rounded float32 product, appear
// exactly one cycle later and carry the value bus's last flag.
`timescale 1ns/1ps
module tb_weight_value;
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

  value_bus_t val, wt, out_bus;
  logic [33:0] exp_q [$];
  weight_value dut (.clk, .rst_n, .val, .wt, .out_bus);

  always @(negedge clk) if (rst_n && out_bus.en) begin
    check(exp_q.size() > 0, "unexpected output");
    if (exp_q.size() > 0) begin
      logic [33:0] e;
      e = exp_q.pop_front();
      check({out_bus.last, out_bus.val} == {e[32], e[31:0]}, $sformatf("got %h want %h", out_bus.val, e[31:0]));
    end
  end

  initial begin
    val = VB_IDLE; wt = VB_IDLE;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    for (int i = 0; i < 500; i++) begin
      @(negedge clk);
      val = '{en: ($urandom % 4 != 0), last: ($urandom % 5 == 0), val: rnd_fp(8.0)};
      wt  = '{en: val.en, last: 1'b0, val: rnd_fp(2.0)};
      if (val.en) exp_q.push_back({1'b1, val.last, ref_mul(val.val, wt.val)});
    end
    @(negedge clk);
    val = VB_IDLE;
    repeat (3) @(negedge clk);
    check(exp_q.size() == 0, "products missing");
    finish_tb();
  end
endmodule
