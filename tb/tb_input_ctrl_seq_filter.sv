// tb_input_ctrl_seq_filter: the controller of input channel 1 of a layer
// with 2 input and 3 output channels, 3x3 kernels on a 5x6 image. All
// weights of the layer are written, so the controller must keep only its
// channel's. After the image is stored it must stream, filter by filter
// and window by window, each image value with its weight, one pair per
// cycle with no gaps, last on slot 8 of each window.
`timescale 1ns/1ps
module tb_input_ctrl_seq_filter;
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

  localparam int H = 5, W = 6, K = 3, C_OUT = 3, C_IN = 2, CIDX = 1;
  localparam int HO = H - K + 1, WO = W - K + 1, KK = K * K;
  value_bus_t in_bus, out_val, out_wt;
  logic cfg_we;
  logic [11:0] cfg_addr;
  logic [31:0] cfg_data;
  logic [31:0] wt [C_OUT*C_IN*KK];
  logic [31:0] img [H*W];
  input_ctrl_seq_filter #(.H(H), .W(W), .K(K), .C_OUT(C_OUT), .C_IN(C_IN), .CIDX(CIDX)) dut (
    .clk, .rst_n, .in_bus, .out_val, .out_wt, .cfg_we, .cfg_addr, .cfg_data);

  initial begin
    in_bus = VB_IDLE; cfg_we = 0; cfg_addr = 0; cfg_data = 0;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    for (int i = 0; i < C_OUT * C_IN * KK; i++) begin
      @(negedge clk);
      cfg_we = 1; cfg_addr = 12'(i); cfg_data = rnd_fp(1.0); wt[i] = cfg_data;
    end
    @(negedge clk); cfg_we = 0;
    for (int rep = 0; rep < 2; rep++) begin
      for (int i = 0; i < H * W; i++) begin
        @(negedge clk);
        img[i] = rnd_fp(9.0);
        in_bus = '{en: 1'b1, last: (i == H * W - 1), val: img[i]};
      end
      @(negedge clk);
      in_bus = VB_IDLE;
      for (int f = 0; f < C_OUT; f++)
        for (int oy = 0; oy < HO; oy++)
          for (int ox = 0; ox < WO; ox++)
            for (int k = 0; k < KK; k++) begin
              @(negedge clk);
              check(out_val.en && out_wt.en, "pair not valid");
              check(out_val.val == img[(oy + k / K) * W + ox + k % K], $sformatf("value f%0d y%0d x%0d k%0d", f, oy, ox, k));
              check(out_wt.val == wt[(f * C_IN + CIDX) * KK + k], $sformatf("weight f%0d k%0d", f, k));
              check(out_val.last == (k == KK - 1), "last flag");
            end
      @(negedge clk);
      check(!out_val.en, "extra output");
    end
    finish_tb();
  end
endmodule
