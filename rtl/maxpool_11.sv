// maxpool_11: max pooling on a channel-sequential bus (MaxPool_11). The
// whole C x H x W input is stored in one BRAM; then the windows of channel
// 0, channel 1 and so on are streamed two values per cycle into a single
// running-maximum unit, so the output is also channel after channel.
// Storing everything first follows the reference latency equation
// H*W*C + 2 + ceil(K*K/2)*HO*WO*C, which this design meets exactly (632
// cycles for maxPool2).
module maxpool_11
  import cnn_pkg::*;
#(
  parameter int C      = 5,
  parameter int H      = 9,
  parameter int W      = 9,
  parameter int K      = 3,
  parameter int STRIDE = 3
) (
  input  logic       clk,
  input  logic       rst_n,
  input  value_bus_t in_bus,
  output value_bus_t out_bus
);
  localparam int HO = (H - K) / STRIDE + 1;
  localparam int WO = (W - K) / STRIDE + 1;

  value_bus_t win_a, win_b;
  logic       busy;

  input_ctrl_par_filter #(.H(H), .W(W), .K(K), .STRIDE(STRIDE), .CH(C)) u_ictrl (
    .clk, .rst_n, .in_bus, .out_a(win_a), .out_b(win_b), .busy
  );
  max_ctrl #(.N_OUT(C * HO * WO)) u_max (.clk, .rst_n, .in_a(win_a), .in_b(win_b), .out_bus);
endmodule
