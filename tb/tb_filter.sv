// tb_filter: a Filter with two input channels, 3x3 kernels and 4 output
// pixels per channel. Random weights, bias and windows go in as the two
// input controllers would send them (5 pairs per window, one per cycle).
// Each output must match the double-precision value
// bias + sum_c sum_k x*w to float32 accuracy, with last on every 4th,
// C_IN + 6 cycles after the window's last pair.
`timescale 1ns/1ps
module tb_filter;
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

  localparam int C_IN = 2, K = 3, KK = 9, N_OUT = 4;
  value_bus_t in_a [C_IN];
  value_bus_t in_b [C_IN];
  value_bus_t out_bus;
  logic cfg_we;
  logic [11:0] cfg_addr;
  logic [31:0] cfg_data, bias;
  logic [31:0] w [C_IN*KK];
  real want_q [$], mag_q [$];
  int due_q [$];
  int nout = 0;
  filter #(.C_IN(C_IN), .K(K), .N_OUT(N_OUT), .WBASE(3), .BBASE(40)) dut (
    .clk, .rst_n, .in_a, .in_b, .out_bus, .cfg_we, .cfg_addr, .cfg_data);

  always @(negedge clk) if (rst_n && out_bus.en) begin
    check(want_q.size() > 0, "unexpected output");
    if (want_q.size() > 0) begin
      real wv, mg;
      int due;
      wv = want_q.pop_front(); mg = mag_q.pop_front(); due = due_q.pop_front();
      check(near(out_bus.val, wv, 1e-6, mg), $sformatf("got %f want %f", f2r(out_bus.val), wv));
      check(cycle == due, $sformatf("latency: at %0d want %0d", cycle, due));
      check(out_bus.last == (nout % N_OUT == N_OUT - 1), "last flag");
      nout++;
    end
  end

  initial begin
    for (int c = 0; c < C_IN; c++) begin in_a[c] = VB_IDLE; in_b[c] = VB_IDLE; end
    cfg_we = 0; cfg_addr = 0; cfg_data = 0;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    for (int k = 0; k < C_IN * KK; k++) begin
      @(negedge clk);
      cfg_we = 1; cfg_addr = 12'(3 + k); cfg_data = rnd_fp(1.0); w[k] = cfg_data;
    end
    @(negedge clk); bias = rnd_fp(2.0); cfg_addr = 12'd40; cfg_data = bias;
    @(negedge clk); cfg_we = 0;
    for (int win = 0; win < 12; win++) begin
      logic [31:0] v [C_IN][10];
      real acc, mag;
      acc = f2r(bias); mag = (acc < 0.0) ? -acc : acc;
      for (int c = 0; c < C_IN; c++)
        for (int k = 0; k < 10; k++) begin
          v[c][k] = rnd_fp(8.0);
          if (k < 9) begin
            real t;
            t = f2r(v[c][k]) * f2r(w[c * KK + k]);
            acc += t; mag += (t < 0.0) ? -t : t;
          end
        end
      for (int p = 0; p < 5; p++) begin
        @(negedge clk);
        for (int c = 0; c < C_IN; c++) begin
          in_a[c] = '{en: 1'b1, last: (p == 4), val: v[c][2 * p]};
          in_b[c] = '{en: 1'b1, last: (p == 4), val: v[c][2 * p + 1]};
        end
        if (p == 4) begin
          want_q.push_back(acc); mag_q.push_back(mag); due_q.push_back(cycle + C_IN + 6);
        end
      end
    end
    @(negedge clk);
    for (int c = 0; c < C_IN; c++) begin in_a[c] = VB_IDLE; in_b[c] = VB_IDLE; end
    repeat (15) @(negedge clk);
    check(want_q.size() == 0 && nout == 12, "results missing");
    finish_tb();
  end
endmodule
