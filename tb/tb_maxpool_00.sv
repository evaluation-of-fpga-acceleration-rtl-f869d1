// tb_maxpool_00: maxPool1 at its real size (3 lanes, 26x26, 2x2 windows,
// stride 2). Streams two random inputs with values of both signs and
// checks each 13x13 output pixel of every lane against the window maximum
// (exact), one output per 2 cycles, last on the final pixel and the total
// latency H*W + ceil(K*K/2)*HO*WO + 2 cycles (1016 for maxPool1, as in the reference).
`timescale 1ns/1ps
module tb_maxpool_00;
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

  localparam int LANES = 3, H = 26, W = 26, K = 2, S = 2;
  localparam int HO = (H - K) / S + 1, WO = (W - K) / S + 1, NP = (K * K + 1) / 2;
  value_bus_t in_bus [LANES];
  value_bus_t out_bus [LANES];
  logic [31:0] img [LANES][H*W];
  int nout, first_cycle, last_cycle, prev_cycle;
  maxpool_00 #(.LANES(LANES), .H(H), .W(W), .K(K), .STRIDE(S)) dut (.clk, .rst_n, .in_bus, .out_bus);

  always @(negedge clk) if (rst_n && out_bus[0].en) begin
    int y, x;
    y = nout / WO; x = nout % WO;
    for (int c = 0; c < LANES; c++) begin
      real m;
      m = -1e30;
      for (int ky = 0; ky < K; ky++)
        for (int kx = 0; kx < K; kx++)
          if (f2r(img[c][(y * S + ky) * W + x * S + kx]) > m) m = f2r(img[c][(y * S + ky) * W + x * S + kx]);
      check(out_bus[c].en && f2r(out_bus[c].val) == m, $sformatf("lane %0d y%0d x%0d got %f want %f", c, y, x, f2r(out_bus[c].val), m));
      check(out_bus[c].last == (nout == HO * WO - 1), "last flag");
    end
    if (nout > 0) check(cycle - prev_cycle == NP, "output rate");
    prev_cycle = cycle;
    last_cycle = cycle;
    nout++;
  end

  initial begin
    for (int c = 0; c < LANES; c++) in_bus[c] = VB_IDLE;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    for (int rep = 0; rep < 2; rep++) begin
      nout = 0;
      for (int i = 0; i < H * W; i++) begin
        @(negedge clk);
        if (i == 0) first_cycle = cycle;
        for (int c = 0; c < LANES; c++) begin
          img[c][i] = rnd_fp(5.0);
          in_bus[c] = '{en: 1'b1, last: (i == H * W - 1), val: img[c][i]};
        end
      end
      @(negedge clk);
      for (int c = 0; c < LANES; c++) in_bus[c] = VB_IDLE;
      wait (nout == HO * WO);
      repeat (5) @(negedge clk);
      check(nout == HO * WO, "output count");
      check(last_cycle - first_cycle + 1 == H * W + NP * HO * WO + 2, $sformatf("latency %0d", last_cycle - first_cycle + 1));
      $display("maxpool_00 latency %0d cycles", last_cycle - first_cycle + 1);
    end
    finish_tb();
  end
endmodule
