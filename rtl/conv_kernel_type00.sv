// conv_kernel_type00: the ConvKernel_type00 wrapper. Computes the
// sum-product of one K x K window of one input channel with the matching
// weights, using two branches so that both ports of the channel's BRAM are
// used every cycle: KernelCtrl pairs values with weights, each branch
// multiplies (WeightValue) and accumulates (PlusCtrl), and PlusTwo adds the
// two partial sums. Structure as in the reference design.
// Timing: the sum appears 4 cycles after the window's last pair arrives.
module conv_kernel_type00
  import cnn_pkg::*;
#(
  parameter int K    = 3,
  parameter int BASE = 0
) (
  input  logic        clk,
  input  logic        rst_n,
  input  value_bus_t  in_a,
  input  value_bus_t  in_b,
  output value_bus_t  out_bus,
  input  logic        cfg_we,
  input  logic [11:0] cfg_addr,
  input  logic [31:0] cfg_data
);
  value_bus_t a_val, a_wt, b_val, b_wt, a_prod, b_prod, a_sum, b_sum;

  kernel_ctrl #(.K(K), .BASE(BASE)) u_kctrl (
    .clk, .rst_n, .in_a, .in_b, .a_val, .a_wt, .b_val, .b_wt, .cfg_we, .cfg_addr, .cfg_data
  );
  weight_value u_wv_a (.clk, .rst_n, .val(a_val), .wt(a_wt), .out_bus(a_prod));
  weight_value u_wv_b (.clk, .rst_n, .val(b_val), .wt(b_wt), .out_bus(b_prod));
  plus_ctrl    u_pc_a (.clk, .rst_n, .in_bus(a_prod), .out_bus(a_sum));
  plus_ctrl    u_pc_b (.clk, .rst_n, .in_bus(b_prod), .out_bus(b_sum));
  plus_two     u_pt   (.clk, .rst_n, .in_a(a_sum), .in_b(b_sum), .out_bus);
endmodule
