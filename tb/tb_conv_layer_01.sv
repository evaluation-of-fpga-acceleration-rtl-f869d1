// tb_conv_layer_01: conv2 of the network at its real size (3 -> 5
// channels, 5x5, 13x13 -> 9x9). Loads random weights and biases, streams
// two random 3-channel images (all channels in parallel, one pixel per
// cycle) and compares the sequential output, channel 0 first, with a
// double-precision convolution (float32 accuracy). Checks one output per
// K*K cycles, last on the final value only, and the total latency
// H*W + K*K*HO*WO*C_OUT + C_IN + 6 cycles.
`timescale 1ns/1ps
module tb_conv_layer_01;
  localparam int WATCHDOG = 30000;
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

  localparam int C_IN = 3, C_OUT = 5, H = 13, W = 13, K = 5;
  localparam int HO = H - K + 1, WO = W - K + 1, KK = K * K;
  value_bus_t in_bus [C_IN];
  value_bus_t out_bus;
  logic cfg_we;
  logic [11:0] cfg_addr;
  logic [31:0] cfg_data;
  logic [31:0] wt [C_OUT*C_IN*KK + C_OUT];
  logic [31:0] img [C_IN][H*W];
  int nout, first_cycle, last_cycle, prev_cycle;
  bit collecting;
  conv_layer_01 #(.C_IN(C_IN), .C_OUT(C_OUT), .H(H), .W(W), .K(K)) dut (
    .clk, .rst_n, .in_bus, .out_bus, .cfg_we, .cfg_addr, .cfg_data);

  always @(negedge clk) if (rst_n && collecting && out_bus.en) begin
    int f, y, x;
    real acc, mag, t;
    f = nout / (HO * WO); y = (nout % (HO * WO)) / WO; x = nout % WO;
    acc = f2r(wt[C_OUT * C_IN * KK + f]); mag = 1e-6;
    for (int c = 0; c < C_IN; c++)
      for (int ky = 0; ky < K; ky++)
        for (int kx = 0; kx < K; kx++) begin
          t = f2r(img[c][(y + ky) * W + x + kx]) * f2r(wt[((f * C_IN + c) * K + ky) * K + kx]);
          acc += t; mag += (t < 0.0) ? -t : t;
        end
    check(near(out_bus.val, acc, 1e-6, mag), $sformatf("f%0d y%0d x%0d got %f want %f", f, y, x, f2r(out_bus.val), acc));
    check(out_bus.last == (nout == C_OUT * HO * WO - 1), "last flag");
    if (nout > 0) check(cycle - prev_cycle == KK, "output rate");
    prev_cycle = cycle;
    last_cycle = cycle;
    nout++;
  end

  initial begin
    for (int c = 0; c < C_IN; c++) in_bus[c] = VB_IDLE;
    cfg_we = 0; cfg_addr = 0; cfg_data = 0; collecting = 0;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    for (int i = 0; i < C_OUT * C_IN * KK + C_OUT; i++) begin
      @(negedge clk);
      cfg_we = 1; cfg_addr = 12'(i); cfg_data = rnd_fp(0.5); wt[i] = cfg_data;
    end
    @(negedge clk); cfg_we = 0;
    for (int rep = 0; rep < 2; rep++) begin
      nout = 0; collecting = 1;
      for (int i = 0; i < H * W; i++) begin
        @(negedge clk);
        if (i == 0) first_cycle = cycle;
        for (int c = 0; c < C_IN; c++) begin
          img[c][i] = rnd_fp(4.0);
          in_bus[c] = '{en: 1'b1, last: (i == H * W - 1), val: img[c][i]};
        end
      end
      @(negedge clk);
      for (int c = 0; c < C_IN; c++) in_bus[c] = VB_IDLE;
      wait (nout == C_OUT * HO * WO);
      repeat (20) @(negedge clk);
      collecting = 0;
      check(nout == C_OUT * HO * WO, "output count");
      check(last_cycle - first_cycle + 1 == H * W + KK * HO * WO * C_OUT + C_IN + 6,
            $sformatf("latency %0d", last_cycle - first_cycle + 1));
      $display("conv_layer_01 latency %0d cycles", last_cycle - first_cycle + 1);
    end
    finish_tb();
  end
endmodule
