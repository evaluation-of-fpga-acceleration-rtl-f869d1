// relu_11: ReLU on a channel-sequential bus (ReLU_11). Puts out max(0, x)
// for each value: sign bit set gives +0.0, anything else passes. Channels
// need no special handling. One register stage, so HW*C + 1 cycles for a
// whole input, as in the reference. The output sign bit is always 0.
module relu_11
  import cnn_pkg::*;
(
  input  logic       clk,
  input  logic       rst_n,
  input  value_bus_t in_bus,
  output value_bus_t out_bus
);
  always_ff @(posedge clk) begin
    if (!rst_n) begin
      out_bus <= VB_IDLE;
    end else begin
      out_bus.en   <= in_bus.en;
      out_bus.last <= in_bus.last;
      out_bus.val  <= in_bus.val[31] ? FP_ZERO : in_bus.val;
    end
  end
endmodule
