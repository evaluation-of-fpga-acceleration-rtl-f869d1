// batchnorm_11: batch normalisation on a channel-sequential bus
// (BatchNorm_11). Values arrive channel after channel, HW per channel; a
// counter tells which channel a value belongs to and the channel number
// travels down the four float32 stages with it, so each stage uses that
// channel's constant:
//   y = (x - mean[c]) * inv_std[c] * gamma[c] + beta[c]
// cfg address 4c + 0 mean, 4c + 1 inv_std (= 1/sqrt(var + eps), computed
// off-line), 4c + 2 gamma, 4c + 3 beta. Latency 4 cycles per value, so
// HW*C + 4 for a whole input; the reference reports HW*C + 8 for its
// version, whose extra stages are not described.
module batchnorm_11
  import cnn_pkg::*;
#(
  parameter int C  = 5,
  parameter int HW = 81
) (
  input  logic        clk,
  input  logic        rst_n,
  input  value_bus_t  in_bus,
  output value_bus_t  out_bus,
  input  logic        cfg_we,
  input  logic [11:0] cfg_addr,
  input  logic [31:0] cfg_data
);
  localparam int CW = (C > 1) ? $clog2(C) : 1;
  localparam int NW = $clog2(HW + 1);

  logic [31:0]   cst [C*4];
  logic [NW-1:0] n;
  logic [CW-1:0] ch, ch1, ch2, ch3;
  value_bus_t    s1, s2, s3;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      for (int i = 0; i < C * 4; i++) cst[i] <= (i % 4 == 0 || i % 4 == 3) ? FP_ZERO : FP_ONE;
    end else if (cfg_we && int'(cfg_addr) < C * 4) begin
      cst[int'(cfg_addr)] <= cfg_data;
    end
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      n <= '0;
      ch <= '0;
    end else if (in_bus.en) begin
      if (n == NW'(HW - 1)) begin
        n  <= '0;
        ch <= (ch == CW'(C - 1)) ? '0 : ch + 1'b1;
      end else begin
        n <= n + 1'b1;
      end
    end
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      s1 <= VB_IDLE;
      s2 <= VB_IDLE;
      s3 <= VB_IDLE;
      out_bus <= VB_IDLE;
      ch1 <= '0;
      ch2 <= '0;
      ch3 <= '0;
    end else begin
      ch1 <= ch;
      ch2 <= ch1;
      ch3 <= ch2;
      s1 <= '{en: in_bus.en, last: in_bus.last, val: fp_sub(in_bus.val, cst[4*int'(ch)])};
      s2 <= '{en: s1.en, last: s1.last, val: fp_mul(s1.val, cst[4*int'(ch1)+1])};
      s3 <= '{en: s2.en, last: s2.last, val: fp_mul(s2.val, cst[4*int'(ch2)+2])};
      out_bus <= '{en: s3.en, last: s3.last, val: fp_add(s3.val, cst[4*int'(ch3)+3])};
    end
  end
endmodule
