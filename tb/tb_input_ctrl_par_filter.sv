// tb_input_ctrl_par_filter: stores two 6x7 channels (CH = 2) and checks
// the streamed 3x3 windows at stride 2: every pair must hold the right
// two window slots (the pad slot repeating slot 8), last on the fifth pair
// of each window, the first pair one cycle after the last value is stored
// and one pair per cycle with no gaps. Two inputs are sent to check that
// the controller returns to loading.
`timescale 1ns/1ps
module tb_input_ctrl_par_filter;
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

  localparam int H = 6, W = 7, K = 3, S = 2, CH = 2;
  localparam int HO = (H - K) / S + 1, WO = (W - K) / S + 1, NP = (K * K + 1) / 2;
  value_bus_t in_bus, out_a, out_b;
  logic busy;
  logic [31:0] img [CH*H*W];
  input_ctrl_par_filter #(.H(H), .W(W), .K(K), .STRIDE(S), .CH(CH)) dut (.clk, .rst_n, .in_bus, .out_a, .out_b, .busy);

  initial begin
    in_bus = VB_IDLE;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    for (int rep = 0; rep < 2; rep++) begin
      int n;
      for (int i = 0; i < CH * H * W; i++) begin
        @(negedge clk);
        img[i] = rnd_fp(50.0);
        in_bus = '{en: 1'b1, last: (i == CH * H * W - 1), val: img[i]};
      end
      @(negedge clk);
      in_bus = VB_IDLE;
      check(!out_a.en, "output before first pair slot");
      n = 0;
      for (int c = 0; c < CH; c++)
        for (int oy = 0; oy < HO; oy++)
          for (int ox = 0; ox < WO; ox++)
            for (int p = 0; p < NP; p++) begin
              int sa, sb, base;
              @(negedge clk);
              sa = 2 * p; sb = (2 * p + 1 < K * K) ? 2 * p + 1 : 2 * p;
              base = c * H * W + oy * S * W + ox * S;
              check(out_a.en && out_b.en, "pair not valid");
              check(out_a.val == img[base + (sa / K) * W + sa % K], $sformatf("slot %0d c%0d y%0d x%0d", sa, c, oy, ox));
              check(out_b.val == img[base + (sb / K) * W + sb % K], $sformatf("slot %0d c%0d y%0d x%0d", sb, c, oy, ox));
              check(out_a.last == (p == NP - 1), "last flag");
              n++;
            end
      @(negedge clk);
      check(!out_a.en && !busy, "extra pairs after the final window");
      check(n == CH * HO * WO * NP, "pair count");
    end
    finish_tb();
  end
endmodule
