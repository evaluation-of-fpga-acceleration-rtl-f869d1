// align: the Align process of ConvLayer_01. It holds the C_OUT filter
// biases (cfg addresses BASE + f) and, for every sum that arrives, puts the
// sum on out_sum and the bias of the filter it belongs to on out_bias in
// the same cycle. The filter is found by counting: each filter yields
// N_PER sums (one output channel) before the next begins. last on out_sum
// marks the final value of the final filter, the end of the whole output.
// One cycle latency.
module align
  import cnn_pkg::*;
#(
  parameter int C_OUT = 5,
  parameter int N_PER = 81,
  parameter int BASE  = 0
) (
  input  logic        clk,
  input  logic        rst_n,
  input  value_bus_t  in_bus,
  output value_bus_t  out_sum,
  output value_bus_t  out_bias,
  input  logic        cfg_we,
  input  logic [11:0] cfg_addr,
  input  logic [31:0] cfg_data
);
  localparam int FW = (C_OUT > 1) ? $clog2(C_OUT) : 1;
  localparam int NW = $clog2(N_PER + 1);

  logic [31:0]   bias [C_OUT];
  logic [FW-1:0] f;
  logic [NW-1:0] n;
  logic          end_ch, end_all;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      for (int i = 0; i < C_OUT; i++) bias[i] <= FP_ZERO;
    end else if (cfg_we && int'(cfg_addr) >= BASE && int'(cfg_addr) < BASE + C_OUT) begin
      bias[int'(cfg_addr) - BASE] <= cfg_data;
    end
  end

  assign end_ch  = n == NW'(N_PER - 1);
  assign end_all = end_ch && f == FW'(C_OUT - 1);

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      f        <= '0;
      n        <= '0;
      out_sum  <= VB_IDLE;
      out_bias <= VB_IDLE;
    end else begin
      out_sum.en    <= in_bus.en;
      out_bias.en   <= in_bus.en;
      out_sum.last  <= in_bus.en && end_all;
      out_bias.last <= in_bus.en && end_all;
      if (in_bus.en) begin
        out_sum.val  <= in_bus.val;
        out_bias.val <= bias[f];
        if (end_all) begin
          f <= '0;
          n <= '0;
        end else if (end_ch) begin
          f <= f + 1'b1;
          n <= '0;
        end else begin
          n <= n + 1'b1;
        end
      end
    end
  end
endmodule
