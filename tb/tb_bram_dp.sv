// tb_bram_dp: fills a 64-word dual-port RAM through both ports, reads it
// back through both ports at once and checks the one-cycle read latency
// and that a read during a write returns the old word.
`timescale 1ns/1ps
module tb_bram_dp;
  localparam int WATCHDOG = 2000;
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

  localparam int D = 64;
  logic a_en, a_we, b_en, b_we;
  logic [5:0] a_addr, b_addr;
  logic [31:0] a_wdata, b_wdata, a_rdata, b_rdata;
  logic [31:0] model [D];
  bram_dp #(.DEPTH(D), .WIDTH(32)) dut (.clk, .a_en, .a_we, .a_addr, .a_wdata, .a_rdata,
                                        .b_en, .b_we, .b_addr, .b_wdata, .b_rdata);
  initial begin
    a_en = 0; a_we = 0; b_en = 0; b_we = 0; a_addr = 0; b_addr = 0; a_wdata = 0; b_wdata = 0;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    for (int i = 0; i < D / 2; i++) begin
      @(negedge clk);
      a_en = 1; a_we = 1; a_addr = 6'(2 * i); a_wdata = $urandom;
      b_en = 1; b_we = 1; b_addr = 6'(2 * i + 1); b_wdata = $urandom;
      model[2 * i] = a_wdata;
      model[2 * i + 1] = b_wdata;
    end
    for (int r = 0; r < 200; r++) begin
      logic [5:0] aa, ba;
      @(negedge clk);
      aa = 6'($urandom); ba = 6'($urandom);
      a_en = 1; a_we = 0; a_addr = aa;
      b_en = 1; b_we = 0; b_addr = ba;
      @(negedge clk);
      a_en = 0; b_en = 0;
      check(a_rdata == model[aa], $sformatf("port A addr %0d", aa));
      check(b_rdata == model[ba], $sformatf("port B addr %0d", ba));
    end
    // write with read on port A: old data returned, new data stored
    @(negedge clk);
    a_en = 1; a_we = 1; a_addr = 6'd5; a_wdata = 32'hdead_beef;
    @(negedge clk);
    a_en = 0; a_we = 0;
    check(a_rdata == model[5], "read-first on write");
    model[5] = 32'hdead_beef;
    @(negedge clk);
    b_en = 1; b_addr = 6'd5;
    @(negedge clk);
    b_en = 0;
    check(b_rdata == 32'hdead_beef, "written word visible on port B");
    finish_tb();
  end
endmodule
