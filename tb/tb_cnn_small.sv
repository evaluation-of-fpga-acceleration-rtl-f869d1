// tb_cnn_small: the whole CNN_small network at its real size. Random
// weights, biases and batch-norm constants are loaded through the cfg
// port, then three random 28x28 images are classified one after another.
// A double-precision model of the network (convolutions, batch norm,
// ReLU, max pooling, linear, softmax) gives the expected logits, which are
// compared at the linear layer's output, and the expected probabilities.
// The testbench also measures the cycles from the first pixel to the
// result (the reference design reports 14,908) and counts the mechanisms
// the design relies on, failing if one never happens: layers working at
// the same time, ReLU clamping in both halves, conv2 moving on to the next
// filter, and the pair-wise window reads with a padded odd slot. At the end
// it prints the error statistics of the probabilities against the model
// (mean, variance, largest error, relative RMS error) and bounds the last,
// and the cycle at which each layer starts, which must lie within 20 cycles
// of the reference schedule.
`timescale 1ns/1ps
module tb_cnn_small;
  localparam int WATCHDOG = 100000;
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

  localparam int IMG = 28, C1 = 3, S1 = 26, P1 = 13, C2 = 5, S2 = 9, P2 = 3, NL = 45;
  value_bus_t in_bus;
  value_bus_t out_bus [2];
  logic cfg_we;
  logic [3:0] cfg_layer;
  logic [11:0] cfg_addr;
  logic [31:0] cfg_data;

  cnn_small dut (.clk, .rst_n, .in_bus, .out_bus, .cfg_we, .cfg_layer, .cfg_addr, .cfg_data);

  real w1 [C1*9 + C1];
  real bn1 [C1*4];
  real w2 [C2*C1*25 + C2];
  real bn2 [C2*4];
  real wl [2*NL + 2];
  real x0 [IMG*IMG];
  real a1 [C1][S1*S1];
  real q1 [C1][P1*P1];
  real a2 [C2][S2*S2];
  real q2 [NL];
  real logit [2], prob [2], mag [2];

  int n_overlap = 0, n_relu1 = 0, n_relu2 = 0, n_filter_switch = 0, n_pad = 0, n_results = 0;
  int c2_count = 0;
  // error statistics over all probabilities: mean, variance, largest error
  // and the relative root-mean-squared error sqrt(mean(e^2)) / sum(y^2)
  real e_sum = 0.0, e_sq = 0.0, e_max = 0.0, y_sq = 0.0;
  int  e_n = 0;

  // first cycle at which each layer receives a value, for the first image
  // (cycle 1 = first pixel); the reference schedule prints these starts
  localparam int NSTG = 9;
  localparam int REF_START [NSTG] = '{800, 804, 805, 4186, 4558, 4566, 4567, 14676, 14902};
  localparam string STG_NAME [NSTG] = '{"batchNorm1", "relu1", "maxPool1", "conv2", "batchNorm2",
                                        "relu2", "maxPool2", "linear", "softmax"};
  int  stg_start [NSTG];
  int  t_first = -1;
  always @(negedge clk) if (rst_n && t_first >= 0) begin
    logic [NSTG-1:0] v;
    v = {dut.lin[0].en, dut.p2.en, dut.r2.en, dut.b2.en, dut.c2.en, dut.p1[0].en, dut.r1[0].en, dut.b1[0].en, dut.c1[0].en};
    for (int i = 0; i < NSTG; i++) if (v[i] && stg_start[i] == 0) stg_start[i] = cycle - t_first + 1;
  end

  // mechanism counters, observed inside the design
  always @(negedge clk) if (rst_n) begin
    if (dut.c1[0].en && dut.r1[0].en) n_overlap++;
    for (int c = 0; c < C1; c++) if (dut.b1[c].en && dut.b1[c].val[31] && dut.b1[c].val[30:23] != 0) n_relu1++;
    if (dut.b2.en && dut.b2.val[31] && dut.b2.val[30:23] != 0) n_relu2++;
    if (dut.c2.en) begin
      if (c2_count % (S2 * S2) == 0 && c2_count % (C2 * S2 * S2) != 0) n_filter_switch++;
      c2_count++;
    end
    if (dut.u_conv1.g_in[0].u_ictrl.emit && dut.u_conv1.g_in[0].u_ictrl.addr_a == dut.u_conv1.g_in[0].u_ictrl.addr_b) n_pad++;
  end

  task automatic cfg(input int layer, input int addr, input real v, output real stored);
    logic [31:0] b;
    b = r2f(v);
    stored = f2r(b);
    @(negedge clk);
    cfg_we = 1; cfg_layer = 4'(layer); cfg_addr = 12'(addr); cfg_data = b;
  endtask

  function automatic real rnd(input real scale);
    return scale * (real'(int'($urandom % 8192)) - 4096.0) / 4096.0;
  endfunction

  function automatic real bnorm(input real x, input real p [], input int c);
    return (x - p[4*c]) * p[4*c+1] * p[4*c+2] + p[4*c+3];
  endfunction

  task automatic model();
    real s, m, t, mx;
    real bn1d [], bn2d [];
    bn1d = new[C1*4]; bn2d = new[C2*4];
    foreach (bn1[i]) bn1d[i] = bn1[i];
    foreach (bn2[i]) bn2d[i] = bn2[i];
    for (int f = 0; f < C1; f++)
      for (int y = 0; y < S1; y++)
        for (int x = 0; x < S1; x++) begin
          s = w1[C1 * 9 + f];
          for (int k = 0; k < 9; k++) s += x0[(y + k / 3) * IMG + x + k % 3] * w1[f * 9 + k];
          s = bnorm(s, bn1d, f);
          a1[f][y * S1 + x] = (s > 0.0) ? s : 0.0;
        end
    for (int f = 0; f < C1; f++)
      for (int y = 0; y < P1; y++)
        for (int x = 0; x < P1; x++) begin
          mx = -1e30;
          for (int k = 0; k < 4; k++) begin
            t = a1[f][(2 * y + k / 2) * S1 + 2 * x + k % 2];
            if (t > mx) mx = t;
          end
          q1[f][y * P1 + x] = mx;
        end
    for (int f = 0; f < C2; f++)
      for (int y = 0; y < S2; y++)
        for (int x = 0; x < S2; x++) begin
          s = w2[C2 * C1 * 25 + f];
          for (int c = 0; c < C1; c++)
            for (int k = 0; k < 25; k++) s += q1[c][(y + k / 5) * P1 + x + k % 5] * w2[(f * C1 + c) * 25 + k];
          s = bnorm(s, bn2d, f);
          a2[f][y * S2 + x] = (s > 0.0) ? s : 0.0;
        end
    for (int f = 0; f < C2; f++)
      for (int y = 0; y < P2; y++)
        for (int x = 0; x < P2; x++) begin
          mx = -1e30;
          for (int k = 0; k < 9; k++) begin
            t = a2[f][(3 * y + k / 3) * S2 + 3 * x + k % 3];
            if (t > mx) mx = t;
          end
          q2[(f * P2 + y) * P2 + x] = mx;
        end
    m = 0.0;
    for (int o = 0; o < 2; o++) begin
      logit[o] = wl[2 * NL + o];
      mag[o] = 1e-3 + ((logit[o] < 0.0) ? -logit[o] : logit[o]);
      for (int i = 0; i < NL; i++) begin
        t = q2[i] * wl[o * NL + i];
        logit[o] += t;
        mag[o] += (t < 0.0) ? -t : t;
      end
      m += $exp(logit[o]);
    end
    for (int o = 0; o < 2; o++) prob[o] = $exp(logit[o]) / m;
  endtask

  initial begin
    int t0, got_logits;
    in_bus = VB_IDLE; cfg_we = 0; cfg_layer = 0; cfg_addr = 0; cfg_data = 0;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    for (int i = 0; i < C1 * 9 + C1; i++) cfg(0, i, rnd(0.6), w1[i]);
    for (int i = 0; i < C1 * 4; i++) cfg(1, i, (i % 4 == 1) ? 0.5 + rnd(0.25) + 0.25 : rnd(0.3), bn1[i]);
    for (int i = 0; i < C2 * C1 * 25 + C2; i++) cfg(2, i, rnd(0.15), w2[i]);
    for (int i = 0; i < C2 * 4; i++) cfg(3, i, (i % 4 == 1) ? 0.5 + rnd(0.25) + 0.25 : rnd(0.3), bn2[i]);
    for (int i = 0; i < 2 * NL + 2; i++) cfg(4, i, rnd(0.4), wl[i]);
    @(negedge clk); cfg_we = 0;
    for (int img = 0; img < 3; img++) begin
      for (int i = 0; i < IMG * IMG; i++) x0[i] = f2r(r2f(real'($urandom % 256) / 255.0));
      model();
      t0 = cycle;
      for (int i = 0; i < IMG * IMG; i++) begin
        @(negedge clk);
        if (i == 0) t0 = cycle;
        if (i == 0 && img == 0) t_first = cycle;
        in_bus = '{en: 1'b1, last: (i == IMG * IMG - 1), val: r2f(x0[i])};
      end
      @(negedge clk);
      in_bus = VB_IDLE;
      got_logits = 0;
      while (!out_bus[0].en) begin
        @(negedge clk);
        if (dut.lin[0].en) begin
          got_logits++;
          for (int o = 0; o < 2; o++)
            check(near(dut.lin[o].val, logit[o], 1e-5, mag[o]),
                  $sformatf("image %0d logit %0d got %f want %f", img, o, f2r(dut.lin[o].val), logit[o]));
        end
      end
      check(got_logits == 1, "one logit pair per image");
      for (int o = 0; o < 2; o++) begin
        real d;
        d = f2r(out_bus[o].val) - prob[o];
        e_sum += d; e_sq += d * d; y_sq += prob[o] * prob[o]; e_n++;
        if ((d < 0.0 ? -d : d) > e_max) e_max = (d < 0.0) ? -d : d;
        check(out_bus[o].en && out_bus[o].last, "probabilities together");
        check(d < 1e-4 && d > -1e-4, $sformatf("image %0d prob %0d got %f want %f", img, o, f2r(out_bus[o].val), prob[o]));
      end
      n_results++;
      $display("image %0d: p = %f %f (model %f %f), %0d cycles from first pixel to result",
               img, f2r(out_bus[0].val), f2r(out_bus[1].val), prob[0], prob[1], cycle - t0 + 1);
      check(cycle - t0 + 1 > 14500 && cycle - t0 + 1 < 15300, "total latency near the reference 14908");
      repeat (5) @(negedge clk);
    end
    $display("mechanisms: overlap=%0d relu1_clamp=%0d relu2_clamp=%0d filter_switch=%0d pad_slot=%0d",
             n_overlap, n_relu1, n_relu2, n_filter_switch, n_pad);
    check(n_overlap > 0, "conv1 and relu1 never worked at the same time");
    check(n_relu1 > 0, "relu1 never clamped");
    check(n_relu2 > 0, "relu2 never clamped");
    check(n_filter_switch == 3 * (C2 - 1), "conv2 filter switches");
    check(n_pad > 0, "no padded window slot");
    check(n_results == 3, "results");
    for (int i = 0; i < NSTG; i++) begin
      $display("%-10s starts at cycle %5d (reference schedule %5d)", STG_NAME[i], stg_start[i], REF_START[i]);
      check(stg_start[i] > REF_START[i] - 20 && stg_start[i] < REF_START[i] + 20,
            {STG_NAME[i], " start far from the reference schedule"});
    end
    begin
      real e_mean, e_var, rrmse;
      e_mean = e_sum / e_n;
      e_var  = e_sq / e_n - e_mean * e_mean;
      rrmse  = $sqrt(e_sq / e_n) / y_sq;
      $display("error against the double model: mean %e variance %e max %e RRMSE %e", e_mean, e_var, e_max, rrmse);
      check(rrmse < 1e-5, "RRMSE of the probabilities");
    end
    finish_tb();
  end
endmodule
