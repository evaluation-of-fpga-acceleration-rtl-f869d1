// tb_maxpool_11: maxPool2 at its real size (5 channels of 9x9 in sequence,
// 3x3 windows, stride 3). Streams two random inputs and checks the 45
// outputs, channel after channel, against the window maxima (exact), last
// on the final output, and the latency C*H*W + ceil(K*K/2)*HO*WO*C + 2 (632 for maxPool2, as in the reference).
`timescale 1ns/1ps
module tb_maxpool_11;
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

  localparam int C = 5, H = 9, W = 9, K = 3, S = 3;
  localparam int HO = (H - K) / S + 1, WO = (W - K) / S + 1, NP = (K * K + 1) / 2;
  value_bus_t in_bus, out_bus;
  logic [31:0] img [C*H*W];
  int nout, first_cycle, last_cycle;
  maxpool_11 #(.C(C), .H(H), .W(W), .K(K), .STRIDE(S)) dut (.clk, .rst_n, .in_bus, .out_bus);

  always @(negedge clk) if (rst_n && out_bus.en) begin
    int c, y, x;
    real m;
    c = nout / (HO * WO); y = (nout % (HO * WO)) / WO; x = nout % WO;
    m = -1e30;
    for (int ky = 0; ky < K; ky++)
      for (int kx = 0; kx < K; kx++)
        if (f2r(img[c * H * W + (y * S + ky) * W + x * S + kx]) > m) m = f2r(img[c * H * W + (y * S + ky) * W + x * S + kx]);
    check(f2r(out_bus.val) == m, $sformatf("c%0d y%0d x%0d got %f want %f", c, y, x, f2r(out_bus.val), m));
    check(out_bus.last == (nout == C * HO * WO - 1), "last flag");
    last_cycle = cycle;
    nout++;
  end

  initial begin
    in_bus = VB_IDLE;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    for (int rep = 0; rep < 2; rep++) begin
      nout = 0;
      for (int i = 0; i < C * H * W; i++) begin
        @(negedge clk);
        if (i == 0) first_cycle = cycle;
        img[i] = rnd_fp(5.0);
        in_bus = '{en: 1'b1, last: (i == C * H * W - 1), val: img[i]};
      end
      @(negedge clk);
      in_bus = VB_IDLE;
      wait (nout == C * HO * WO);
      repeat (5) @(negedge clk);
      check(nout == C * HO * WO, "output count");
      check(last_cycle - first_cycle + 1 == C * H * W + NP * HO * WO * C + 2, $sformatf("latency %0d", last_cycle - first_cycle + 1));
      $display("maxpool_11 latency %0d cycles", last_cycle - first_cycle + 1);
    end
    finish_tb();
  end
endmodule
