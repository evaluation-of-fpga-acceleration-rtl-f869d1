// conv_kernel_type01: the ConvKernel_type01 wrapper of ConvLayer_01. Each
// cycle a window value and its weight arrive together; WeightValue
// multiplies them and PlusCtrl accumulates the products, putting out the
// window's sum-product after the slot marked last. Structure as in the
// reference design. Timing: the sum appears 2 cycles after the last slot.
module conv_kernel_type01
  import cnn_pkg::*;
(
  input  logic       clk,
  input  logic       rst_n,
  input  value_bus_t in_val,
  input  value_bus_t in_wt,
  output value_bus_t out_bus
);
  value_bus_t prod;

  weight_value u_wv (.clk, .rst_n, .val(in_val), .wt(in_wt), .out_bus(prod));
  plus_ctrl    u_pc (.clk, .rst_n, .in_bus(prod), .out_bus);
endmodule
