// tb_bias_add: loads a bias through the cfg port (with writes to other
// addresses that must be ignored), streams three channels of 5 values and
// checks each output is the correctly rounded value + bias, one cycle
// later, with last on every 5th output only.
`timescale 1ns/1ps
module tb_bias_add;
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
  logic cfg_we;
  logic [11:0] cfg_addr;
  logic [31:0] cfg_data, bias;
  logic [32:0] exp_q [$];
  bias_add #(.N_OUT(5), .BASE(7)) dut (.clk, .rst_n, .in_bus, .out_bus, .cfg_we, .cfg_addr, .cfg_data);

  always @(negedge clk) if (rst_n && out_bus.en) begin
    check(exp_q.size() > 0, "unexpected output");
    if (exp_q.size() > 0) begin
      logic [32:0] e;
      e = exp_q.pop_front();
      check({out_bus.last, out_bus.val} == e, $sformatf("got %b %h want %h", out_bus.last, out_bus.val, e));
    end
  end

  initial begin
    in_bus = VB_IDLE; cfg_we = 0; cfg_addr = 0; cfg_data = 0;
    bias = rnd_fp(3.0);
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    @(negedge clk); cfg_we = 1; cfg_addr = 12'd7; cfg_data = bias;
    @(negedge clk); cfg_addr = 12'd6; cfg_data = rnd_fp(3.0);
    @(negedge clk); cfg_addr = 12'd8; cfg_data = rnd_fp(3.0);
    @(negedge clk); cfg_we = 0;
    for (int i = 0; i < 15; i++) begin
      @(negedge clk);
      in_bus = '{en: 1'b1, last: 1'b0, val: rnd_fp(10.0)};
      exp_q.push_back({(i % 5 == 4), ref_add(in_bus.val, bias)});
      if (i % 2 == 0) begin
        @(negedge clk);
        in_bus = VB_IDLE;
      end
    end
    @(negedge clk);
    in_bus = VB_IDLE;
    repeat (3) @(negedge clk);
    check(exp_q.size() == 0, "outputs missing");
    finish_tb();
  end
endmodule
