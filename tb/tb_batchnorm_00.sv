// tb_batchnorm_00: batchNorm1 at its real size (3 lanes, 26x26). Loads
// random mean, 1/sqrt(var+eps), gamma and beta per channel, streams a
// random input one pixel per cycle on all lanes and checks every output
// bit for bit against (x - mean) * inv_std * gamma + beta with float32
// rounding after each operation, 4 cycles after its input, and the whole
// channel in HW + 4 cycles.
`timescale 1ns/1ps
module tb_batchnorm_00;
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

  localparam int LANES = 3, HW = 676;
  value_bus_t in_bus [LANES];
  value_bus_t out_bus [LANES];
  logic cfg_we;
  logic [11:0] cfg_addr;
  logic [31:0] cfg_data;
  logic [31:0] cst [LANES*4];
  logic [31:0] exp_q [LANES][$];
  int n_in = 0, n_out = 0, first_cycle = 0, last_cycle = 0;
  batchnorm_00 #(.LANES(LANES)) dut (.clk, .rst_n, .in_bus, .out_bus, .cfg_we, .cfg_addr, .cfg_data);

  always @(negedge clk) if (rst_n && out_bus[0].en) begin
    for (int c = 0; c < LANES; c++) begin
      logic [31:0] e;
      check(out_bus[c].en && exp_q[c].size() > 0, "lane output missing");
      e = exp_q[c].pop_front();
      check(out_bus[c].val == e, $sformatf("lane %0d got %h want %h", c, out_bus[c].val, e));
      check(out_bus[c].last == (n_out == HW - 1), "last flag");
    end
    n_out++;
    last_cycle = cycle;
  end

  initial begin
    for (int c = 0; c < LANES; c++) in_bus[c] = VB_IDLE;
    cfg_we = 0; cfg_addr = 0; cfg_data = 0;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    for (int i = 0; i < LANES * 4; i++) begin
      @(negedge clk);
      cfg_we = 1; cfg_addr = 12'(i);
      cfg_data = (i % 4 == 1) ? r2f(0.25 + real'($urandom % 1000) / 500.0) : rnd_fp(2.0);
      cst[i] = cfg_data;
    end
    @(negedge clk); cfg_we = 0;
    for (int i = 0; i < HW; i++) begin
      @(negedge clk);
      if (i == 0) first_cycle = cycle;
      for (int c = 0; c < LANES; c++) begin
        in_bus[c] = '{en: 1'b1, last: (i == HW - 1), val: rnd_fp(10.0)};
        exp_q[c].push_back(ref_add(ref_mul(ref_mul(ref_add(in_bus[c].val, cst[4*c] ^ 32'h8000_0000),
                                                   cst[4*c+1]), cst[4*c+2]), cst[4*c+3]));
      end
    end
    @(negedge clk);
    for (int c = 0; c < LANES; c++) in_bus[c] = VB_IDLE;
    repeat (8) @(negedge clk);
    check(n_out == HW, "output count");
    check(last_cycle - first_cycle + 1 == HW + 4, $sformatf("latency %0d", last_cycle - first_cycle + 1));
    finish_tb();
  end
endmodule
