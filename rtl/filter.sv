// filter: the Filter wrapper of ConvLayer_00, producing one output channel.
// One ConvKernel_type00 per input channel computes that channel's window
// sum-product; the C_IN results, which arrive together, are serialised by
// ValueArrayCtrl, summed by PlusCtrl and given the filter bias by Bias.
// Structure as in the reference design.
// cfg addresses: kernel c at WBASE + c*K*K + ky*K + kx, bias at BBASE.
// Timing: an output pixel appears C_IN + 6 cycles after the last pair of
// its windows arrives; last marks the N_OUT-th pixel.
module filter
  import cnn_pkg::*;
#(
  parameter int C_IN  = 1,
  parameter int K     = 3,
  parameter int N_OUT = 676,
  parameter int WBASE = 0,
  parameter int BBASE = 9
) (
  input  logic        clk,
  input  logic        rst_n,
  input  value_bus_t  in_a [C_IN],
  input  value_bus_t  in_b [C_IN],
  output value_bus_t  out_bus,
  input  logic        cfg_we,
  input  logic [11:0] cfg_addr,
  input  logic [31:0] cfg_data
);
  value_bus_t ksum [C_IN];
  value_bus_t ser, acc;

  for (genvar c = 0; c < C_IN; c++) begin : g_kernel
    conv_kernel_type00 #(.K(K), .BASE(WBASE + c * K * K)) u_kernel (
      .clk, .rst_n, .in_a(in_a[c]), .in_b(in_b[c]), .out_bus(ksum[c]),
      .cfg_we, .cfg_addr, .cfg_data
    );
  end

  value_array_ctrl #(.N(C_IN)) u_varr (.clk, .rst_n, .in_bus(ksum), .out_bus(ser));
  plus_ctrl u_plus (.clk, .rst_n, .in_bus(ser), .out_bus(acc));
  bias_add #(.N_OUT(N_OUT), .BASE(BBASE)) u_bias (
    .clk, .rst_n, .in_bus(acc), .out_bus, .cfg_we, .cfg_addr, .cfg_data
  );
endmodule
