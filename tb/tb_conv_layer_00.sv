// tb_conv_layer_00: conv1 of the network at its real size (1 -> 3
// channels, 3x3, 28x28 -> 26x26). Loads random weights and biases, streams
// two random images one pixel per cycle and compares every output pixel
// of every channel with a double-precision convolution (float32 accuracy).
// Also checks that all channels deliver each pixel in the same cycle, the
// rate of one pixel per ceil(K*K/2) cycles, last on the final pixel and
// the total latency H*W + ceil(K*K/2)*HO*WO + C_IN + 7 cycles.
`timescale 1ns/1ps
module tb_conv_layer_00;
  localparam int WATCHDOG = 20000;
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

  localparam int C_IN = 1, C_OUT = 3, H = 28, W = 28, K = 3;
  localparam int HO = H - K + 1, WO = W - K + 1, KK = K * K, NP = (KK + 1) / 2;
  value_bus_t in_bus [C_IN];
  value_bus_t out_bus [C_OUT];
  logic cfg_we;
  logic [11:0] cfg_addr;
  logic [31:0] cfg_data;
  logic [31:0] wt [C_OUT*C_IN*KK + C_OUT];
  logic [31:0] img [C_IN][H*W];
  int nout, first_cycle, last_cycle, prev_cycle;
  bit collecting;
  conv_layer_00 #(.C_IN(C_IN), .C_OUT(C_OUT), .H(H), .W(W), .K(K)) dut (
    .clk, .rst_n, .in_bus, .out_bus, .cfg_we, .cfg_addr, .cfg_data);

  always @(negedge clk) if (rst_n && collecting && out_bus[0].en) begin
    int y, x;
    y = nout / WO; x = nout % WO;
    for (int f = 0; f < C_OUT; f++) begin
      real acc, mag, t;
      acc = f2r(wt[C_OUT * C_IN * KK + f]); mag = 1e-6;
      for (int c = 0; c < C_IN; c++)
        for (int ky = 0; ky < K; ky++)
          for (int kx = 0; kx < K; kx++) begin
            t = f2r(img[c][(y + ky) * W + x + kx]) * f2r(wt[((f * C_IN + c) * K + ky) * K + kx]);
            acc += t; mag += (t < 0.0) ? -t : t;
          end
      check(out_bus[f].en, "channels out of step");
      check(near(out_bus[f].val, acc, 1e-6, mag), $sformatf("f%0d y%0d x%0d got %f want %f", f, y, x, f2r(out_bus[f].val), acc));
      check(out_bus[f].last == (nout == HO * WO - 1), "last flag");
    end
    if (nout > 0) check(cycle - prev_cycle == NP, "pixel rate");
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
      cfg_we = 1; cfg_addr = 12'(i); cfg_data = rnd_fp(1.0); wt[i] = cfg_data;
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
      wait (nout == HO * WO);
      repeat (20) @(negedge clk);
      collecting = 0;
      check(nout == HO * WO, "pixel count");
      check(last_cycle - first_cycle + 1 == H * W + NP * HO * WO + C_IN + 7,
            $sformatf("latency %0d", last_cycle - first_cycle + 1));
      $display("conv_layer_00 latency %0d cycles", last_cycle - first_cycle + 1);
    end
    finish_tb();
  end
endmodule
