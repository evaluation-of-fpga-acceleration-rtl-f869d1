// tb_softmax_00: softmax over 2 lanes (the network's size) and, in a
// second instance, over 4 lanes. Random logits in [-20, 20] go in; the
// outputs must match exp(x)/sum(exp) computed in double precision within
// 4 units in the last place of float32, all lanes together with last set,
// C + 3 cycles after the input.
`timescale 1ns/1ps
module tb_softmax_00;
  localparam int WATCHDOG = 10000;
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

  value_bus_t in2 [2];
  value_bus_t out2 [2];
  value_bus_t in4 [4];
  value_bus_t out4 [4];
  softmax_00 #(.C(2)) dut2 (.clk, .rst_n, .in_bus(in2), .out_bus(out2));
  softmax_00 #(.C(4)) dut4 (.clk, .rst_n, .in_bus(in4), .out_bus(out4));

  task automatic run(input int c);
    real x [4];
    real s, want;
    int t0, wait_n;
    s = 0.0;
    @(negedge clk);
    t0 = cycle;
    for (int i = 0; i < c; i++) begin
      logic [31:0] v;
      v = rnd_fp(20.0);
      x[i] = f2r(v);
      s += $exp(x[i]);
      if (c == 2) in2[i] = '{en: 1'b1, last: 1'b1, val: v};
      else in4[i] = '{en: 1'b1, last: 1'b1, val: v};
    end
    @(negedge clk);
    for (int i = 0; i < 2; i++) in2[i] = VB_IDLE;
    for (int i = 0; i < 4; i++) in4[i] = VB_IDLE;
    wait_n = 0;
    while (!((c == 2) ? out2[0].en : out4[0].en) && wait_n < 20) begin
      @(negedge clk);
      wait_n++;
    end
    check(cycle - t0 + 1 == c + 3, $sformatf("latency %0d for C=%0d", cycle - t0 + 1, c));
    for (int i = 0; i < c; i++) begin
      value_bus_t o;
      o = (c == 2) ? out2[i] : out4[i];
      want = $exp(x[i]) / s;
      check(o.en && o.last, "lanes not together");
      check(near(o.val, want, 5e-7, 1e-30), $sformatf("C=%0d lane %0d got %g want %g", c, i, f2r(o.val), want));
    end
  endtask

  initial begin
    for (int i = 0; i < 2; i++) in2[i] = VB_IDLE;
    for (int i = 0; i < 4; i++) in4[i] = VB_IDLE;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    for (int r = 0; r < 100; r++) begin
      run(2);
      run(4);
    end
    finish_tb();
  end
endmodule
