// tb_align: Align with 3 filters of 4 sums each. Every sum must come out
// one cycle later next to the bias of the filter it belongs to, with last
// on the 12th only; a second round checks the filter count restarts.
`timescale 1ns/1ps
module tb_align;
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

  localparam int C_OUT = 3, N_PER = 4;
  value_bus_t in_bus, out_sum, out_bias;
  logic cfg_we;
  logic [11:0] cfg_addr;
  logic [31:0] cfg_data;
  logic [31:0] bias [C_OUT];
  align #(.C_OUT(C_OUT), .N_PER(N_PER), .BASE(100)) dut (.clk, .rst_n, .in_bus, .out_sum, .out_bias, .cfg_we, .cfg_addr, .cfg_data);

  initial begin
    in_bus = VB_IDLE; cfg_we = 0; cfg_addr = 0; cfg_data = 0;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    for (int f = -1; f <= C_OUT; f++) begin
      @(negedge clk);
      cfg_we = 1; cfg_addr = 12'(100 + f); cfg_data = rnd_fp(2.0);
      if (f >= 0 && f < C_OUT) bias[f] = cfg_data;
    end
    @(negedge clk); cfg_we = 0;
    for (int rep = 0; rep < 2; rep++)
      for (int i = 0; i < C_OUT * N_PER; i++) begin
        logic [31:0] v;
        @(negedge clk);
        v = rnd_fp(5.0);
        in_bus = '{en: 1'b1, last: 1'b1, val: v};
        @(negedge clk);
        in_bus = VB_IDLE;
        check(out_sum.en && out_bias.en && out_sum.val == v, "sum passed on");
        check(out_bias.val == bias[i / N_PER], $sformatf("bias of filter %0d", i / N_PER));
        check(out_sum.last == (i == C_OUT * N_PER - 1), "last flag");
        if (i % 3 == 0) @(negedge clk);
      end
    finish_tb();
  end
endmodule
