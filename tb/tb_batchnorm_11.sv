// tb_batchnorm_11: batchNorm2 at its real size (5 channels of 9x9 in
// sequence). Each value must be normalised with the constants of the
// channel it belongs to, bit for bit (float32 rounding after each
// operation), 4 cycles after its input; the whole input takes HW*C + 4.
// Two inputs are sent, the second with gaps, to check the channel count.
`timescale 1ns/1ps
module tb_batchnorm_11;
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

  localparam int C = 5, HW = 81;
  value_bus_t in_bus, out_bus;
  logic cfg_we;
  logic [11:0] cfg_addr;
  logic [31:0] cfg_data;
  logic [31:0] cst [C*4];
  logic [32:0] exp_q [$];
  int first_cycle = 0, last_cycle = 0;
  batchnorm_11 #(.C(C), .HW(HW)) dut (.clk, .rst_n, .in_bus, .out_bus, .cfg_we, .cfg_addr, .cfg_data);

  always @(negedge clk) if (rst_n && out_bus.en) begin
    logic [32:0] e;
    check(exp_q.size() > 0, "unexpected output");
    e = exp_q.pop_front();
    check({out_bus.last, out_bus.val} == e, $sformatf("got %h want %h", out_bus.val, e[31:0]));
    last_cycle = cycle;
  end

  initial begin
    in_bus = VB_IDLE; cfg_we = 0; cfg_addr = 0; cfg_data = 0;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    for (int i = 0; i < C * 4; i++) begin
      @(negedge clk);
      cfg_we = 1; cfg_addr = 12'(i);
      cfg_data = (i % 4 == 1) ? r2f(0.25 + real'($urandom % 1000) / 500.0) : rnd_fp(2.0);
      cst[i] = cfg_data;
    end
    @(negedge clk); cfg_we = 0;
    for (int rep = 0; rep < 2; rep++) begin
      for (int i = 0; i < C * HW; i++) begin
        int c;
        @(negedge clk);
        if (i == 0) first_cycle = cycle;
        c = i / HW;
        in_bus = '{en: 1'b1, last: (i == C * HW - 1), val: rnd_fp(10.0)};
        exp_q.push_back({in_bus.last, ref_add(ref_mul(ref_mul(ref_add(in_bus.val, cst[4*c] ^ 32'h8000_0000),
                                                              cst[4*c+1]), cst[4*c+2]), cst[4*c+3])});
        if (rep == 1 && i % 7 == 0) begin
          @(negedge clk);
          in_bus = VB_IDLE;
        end
      end
      @(negedge clk);
      in_bus = VB_IDLE;
      repeat (8) @(negedge clk);
      check(exp_q.size() == 0, "outputs missing");
      if (rep == 0) check(last_cycle - first_cycle + 1 == C * HW + 4, $sformatf("latency %0d", last_cycle - first_cycle + 1));
    end
    finish_tb();
  end
endmodule
