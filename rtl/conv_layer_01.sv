// conv_layer_01: the ConvLayer_01 convolution (stride 1, no padding) with a
// channel-parallel input and a channel-sequential output. There is a single
// filter datapath that applies the C_OUT filters one after another: each
// input channel has an InputCtrl_SeqFilter (image and that channel's
// weights in one BRAM) feeding a ConvKernel_type01; the C_IN window sums,
// which arrive together, are serialised by ValueArrayCtrl and summed by
// PlusCtrl; Align attaches the bias of the current filter and PlusTwo adds
// it. Structure as in the reference design. The output is output channel
// 0 row by row, then channel 1 and so on; last marks the final value.
// cfg addresses: weight W[f][c][ky][kx] at ((f*C_IN + c)*K + ky)*K + kx,
// bias of filter f at C_OUT*C_IN*K*K + f. Weights are written while idle.
// Timing (input streamed one pixel per cycle): last output
// H*W + K*K*HO*WO*C_OUT + C_IN + 6 cycles after the first input
// (10303 for conv2; the reference reports 10302).
module conv_layer_01
  import cnn_pkg::*;
#(
  parameter int C_IN  = 3,
  parameter int C_OUT = 5,
  parameter int H     = 13,
  parameter int W     = 13,
  parameter int K     = 5
) (
  input  logic        clk,
  input  logic        rst_n,
  input  value_bus_t  in_bus [C_IN],
  output value_bus_t  out_bus,
  input  logic        cfg_we,
  input  logic [11:0] cfg_addr,
  input  logic [31:0] cfg_data
);
  localparam int HO = H - K + 1;
  localparam int WO = W - K + 1;

  value_bus_t win_val [C_IN];
  value_bus_t win_wt  [C_IN];
  value_bus_t ksum    [C_IN];
  value_bus_t ser, acc, a_sum, a_bias;

  for (genvar c = 0; c < C_IN; c++) begin : g_in
    input_ctrl_seq_filter #(.H(H), .W(W), .K(K), .C_OUT(C_OUT), .C_IN(C_IN), .CIDX(c)) u_ictrl (
      .clk, .rst_n, .in_bus(in_bus[c]), .out_val(win_val[c]), .out_wt(win_wt[c]),
      .cfg_we, .cfg_addr, .cfg_data
    );
    conv_kernel_type01 u_kernel (
      .clk, .rst_n, .in_val(win_val[c]), .in_wt(win_wt[c]), .out_bus(ksum[c])
    );
  end

  value_array_ctrl #(.N(C_IN)) u_varr (.clk, .rst_n, .in_bus(ksum), .out_bus(ser));
  plus_ctrl u_plus (.clk, .rst_n, .in_bus(ser), .out_bus(acc));
  align #(.C_OUT(C_OUT), .N_PER(HO * WO), .BASE(C_OUT * C_IN * K * K)) u_align (
    .clk, .rst_n, .in_bus(acc), .out_sum(a_sum), .out_bias(a_bias), .cfg_we, .cfg_addr, .cfg_data
  );
  plus_two u_add (.clk, .rst_n, .in_a(a_sum), .in_b(a_bias), .out_bus);
endmodule
