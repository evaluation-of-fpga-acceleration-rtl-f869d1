// tb_linear_10: the network's linear layer (45 inputs, 2 outputs). Loads
// random weights and biases, streams three random input vectors (the last
// with gaps) and checks both outputs against the double-precision
// bias + sum of products (float32 accuracy), both in the same cycle with
// last set, N_IN + 3 cycles after the first input when streamed without
// gaps.
`timescale 1ns/1ps
module tb_linear_10;
  localparam int WATCHDOG = 3000;
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

  localparam int N_IN = 45, N_OUT = 2;
  value_bus_t in_bus;
  value_bus_t out_bus [N_OUT];
  logic cfg_we;
  logic [11:0] cfg_addr;
  logic [31:0] cfg_data;
  logic [31:0] wt [N_OUT*N_IN + N_OUT];
  logic [31:0] x [N_IN];
  int nres = 0, first_cycle = 0, res_cycle = 0;
  linear_10 #(.N_IN(N_IN), .N_OUT(N_OUT)) dut (.clk, .rst_n, .in_bus, .out_bus, .cfg_we, .cfg_addr, .cfg_data);

  always @(negedge clk) if (rst_n && out_bus[0].en) begin
    for (int f = 0; f < N_OUT; f++) begin
      real acc, mag, t;
      acc = f2r(wt[N_OUT * N_IN + f]); mag = 1e-6;
      for (int i = 0; i < N_IN; i++) begin
        t = f2r(x[i]) * f2r(wt[f * N_IN + i]);
        acc += t; mag += (t < 0.0) ? -t : t;
      end
      check(out_bus[f].en && out_bus[f].last, "outputs not together");
      check(near(out_bus[f].val, acc, 1e-6, mag), $sformatf("out %0d got %f want %f", f, f2r(out_bus[f].val), acc));
    end
    res_cycle = cycle;
    nres++;
  end

  initial begin
    in_bus = VB_IDLE; cfg_we = 0; cfg_addr = 0; cfg_data = 0;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    for (int i = 0; i < N_OUT * N_IN + N_OUT; i++) begin
      @(negedge clk);
      cfg_we = 1; cfg_addr = 12'(i); cfg_data = rnd_fp(1.0); wt[i] = cfg_data;
    end
    @(negedge clk); cfg_we = 0;
    for (int rep = 0; rep < 3; rep++) begin
      for (int i = 0; i < N_IN; i++) begin
        @(negedge clk);
        if (i == 0) first_cycle = cycle;
        x[i] = rnd_fp(3.0);
        in_bus = '{en: 1'b1, last: (i == N_IN - 1), val: x[i]};
        if (rep == 2 && i % 4 == 0) begin
          @(negedge clk);
          in_bus = VB_IDLE;
        end
      end
      @(negedge clk);
      in_bus = VB_IDLE;
      repeat (6) @(negedge clk);
      check(nres == rep + 1, "result missing");
      if (rep == 0) check(res_cycle - first_cycle + 1 == N_IN + 3, $sformatf("latency %0d", res_cycle - first_cycle + 1));
    end
    finish_tb();
  end
endmodule
