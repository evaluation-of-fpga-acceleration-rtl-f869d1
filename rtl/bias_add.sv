// bias_add: the Bias process at the end of a Filter. Adds the filter's bias
// (a float32 register written through the cfg port at address BASE) to each
// value and registers the result. It counts its outputs and sets last on the
// N_OUT-th one, which marks the end of the output channel; the counter is
// this design's way of producing that flag. One cycle latency.
module bias_add
  import cnn_pkg::*;
#(
  parameter int N_OUT = 676,
  parameter int BASE  = 0
) (
  input  logic        clk,
  input  logic        rst_n,
  input  value_bus_t  in_bus,
  output value_bus_t  out_bus,
  input  logic        cfg_we,
  input  logic [11:0] cfg_addr,
  input  logic [31:0] cfg_data
);
  localparam int CW = $clog2(N_OUT + 1);
  logic [31:0]   bias;
  logic [CW-1:0] cnt;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      bias <= FP_ZERO;
    end else if (cfg_we && cfg_addr == 12'(BASE)) begin
      bias <= cfg_data;
    end
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      out_bus <= VB_IDLE;
      cnt     <= '0;
    end else begin
      out_bus.en   <= in_bus.en;
      out_bus.last <= in_bus.en && cnt == CW'(N_OUT - 1);
      if (in_bus.en) begin
        out_bus.val <= fp_add(in_bus.val, bias);
        cnt         <= (cnt == CW'(N_OUT - 1)) ? '0 : cnt + 1'b1;
      end
    end
  end
endmodule
