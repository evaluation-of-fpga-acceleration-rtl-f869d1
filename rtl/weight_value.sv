// weight_value: the WeightValue process. Multiplies the value on one bus by
// the weight on the other (float32) and registers the product; enable and
// last are taken from the value bus. One cycle from input to output.
module weight_value
  import cnn_pkg::*;
(
  input  logic       clk,
  input  logic       rst_n,
  input  value_bus_t val,
  input  value_bus_t wt,
  output value_bus_t out_bus
);
  always_ff @(posedge clk) begin
    if (!rst_n) begin
      out_bus <= VB_IDLE;
    end else begin
      out_bus.en   <= val.en;
      out_bus.last <= val.en & val.last;
      if (val.en) out_bus.val <= fp_mul(val.val, wt.val);
    end
  end
endmodule
