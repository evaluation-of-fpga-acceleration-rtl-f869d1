// conv_layer_00: the ConvLayer_00 convolution (stride 1, no padding) with
// channel-parallel input and output buses. Each input channel is stored by
// its own InputCtrl_ParFilter, which then broadcasts the windows of that
// channel, two values per cycle, to the matching kernel of every Filter.
// All C_OUT filters work at once, so one output pixel of every channel is
// produced every ceil(K*K/2) cycles. Structure as in the reference design.
// cfg addresses: weight W[f][c][ky][kx] at ((f*C_IN + c)*K + ky)*K + kx,
// bias of filter f at C_OUT*C_IN*K*K + f.
// Timing (input streamed one pixel per cycle, all channels together): last
// output H*W + ceil(K*K/2)*HO*WO + C_IN + 7 cycles after the first input
// (4172 for conv1; the reference equation gives 4174).
module conv_layer_00
  import cnn_pkg::*;
#(
  parameter int C_IN  = 1,
  parameter int C_OUT = 3,
  parameter int H     = 28,
  parameter int W     = 28,
  parameter int K     = 3
) (
  input  logic        clk,
  input  logic        rst_n,
  input  value_bus_t  in_bus  [C_IN],
  output value_bus_t  out_bus [C_OUT],
  input  logic        cfg_we,
  input  logic [11:0] cfg_addr,
  input  logic [31:0] cfg_data
);
  localparam int HO = H - K + 1;
  localparam int WO = W - K + 1;
  localparam int KK = K * K;

  value_bus_t win_a [C_IN];
  value_bus_t win_b [C_IN];
  logic       busy  [C_IN];

  for (genvar c = 0; c < C_IN; c++) begin : g_in
    input_ctrl_par_filter #(.H(H), .W(W), .K(K), .STRIDE(1), .CH(1)) u_ictrl (
      .clk, .rst_n, .in_bus(in_bus[c]), .out_a(win_a[c]), .out_b(win_b[c]), .busy(busy[c])
    );
  end

  for (genvar f = 0; f < C_OUT; f++) begin : g_filter
    filter #(.C_IN(C_IN), .K(K), .N_OUT(HO * WO), .WBASE(f * C_IN * KK),
             .BBASE(C_OUT * C_IN * KK + f)) u_filter (
      .clk, .rst_n, .in_a(win_a), .in_b(win_b), .out_bus(out_bus[f]),
      .cfg_we, .cfg_addr, .cfg_data
    );
  end
endmodule
