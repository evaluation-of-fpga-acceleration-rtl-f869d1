// relu_00: ReLU on channel-parallel buses (ReLU_00). Each lane puts out
// max(0, x): a value with its sign bit set (negative, or -0.0) becomes +0.0,
// any other value passes unchanged. One register stage, so a channel of HW
// values takes HW + 1 cycles, as in the reference. No output is negative,
// so the output sign bit is always 0 (synthesis reduces it to a constant).
module relu_00
  import cnn_pkg::*;
#(
  parameter int LANES = 3
) (
  input  logic       clk,
  input  logic       rst_n,
  input  value_bus_t in_bus  [LANES],
  output value_bus_t out_bus [LANES]
);
  always_ff @(posedge clk) begin
    if (!rst_n) begin
      for (int c = 0; c < LANES; c++) out_bus[c] <= VB_IDLE;
    end else begin
      for (int c = 0; c < LANES; c++) begin
        out_bus[c].en   <= in_bus[c].en;
        out_bus[c].last <= in_bus[c].last;
        out_bus[c].val  <= in_bus[c].val[31] ? FP_ZERO : in_bus[c].val;
      end
    end
  end
endmodule
