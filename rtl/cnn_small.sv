// cnn_small: the complete CNN_small classifier, a 1 x 28 x 28 float32 image
// in, two class probabilities out. Every layer is its own streaming unit
// and they are chained by value buses, so each layer starts as soon as the
// first value reaches it:
//   conv1   ConvLayer_00  1 -> 3 channels, 3x3    28x28 -> 26x26  parallel
//   bn1     BatchNorm_00  3 channels                               parallel
//   relu1   ReLU_00                                                parallel
//   pool1   MaxPool_00    2x2 stride 2            26x26 -> 13x13  parallel
//   conv2   ConvLayer_01  3 -> 5 channels, 5x5    13x13 -> 9x9    parallel in, sequential out
//   bn2     BatchNorm_11  5 channels                               sequential
//   relu2   ReLU_11                                                sequential
//   pool2   MaxPool_11    3x3 stride 3            9x9 -> 3x3      sequential
//   linear  Linear_10     45 -> 2                                  sequential in, parallel out
//   softmax Softmax_00    2 classes                                parallel
// The choice of version per layer is the one that fits the target FPGA in
// the reference design; sizes are those of the reference network.
// Weights and constants are written through one port before use: cfg_layer
// selects the layer (0 conv1, 1 bn1, 2 conv2, 3 bn2, 4 linear) and
// cfg_addr the word inside it (see each layer). The image is sent row by
// row, one pixel per cycle with no gaps, last on the final pixel; the next
// image may follow once the result has appeared. There is no backpressure.
// Timing: about 14,900 cycles from the first pixel to the result.
module cnn_small
  import cnn_pkg::*;
#(
  parameter int IMG     = 28,
  parameter int C1      = 3,
  parameter int C2      = 5,
  parameter int N_CLASS = 2
) (
  input  logic        clk,
  input  logic        rst_n,
  input  value_bus_t  in_bus,
  output value_bus_t  out_bus [N_CLASS],
  input  logic        cfg_we,
  input  logic [3:0]  cfg_layer,
  input  logic [11:0] cfg_addr,
  input  logic [31:0] cfg_data
);
  localparam int K1   = 3;
  localparam int S1   = IMG - K1 + 1;       // 26
  localparam int P1K  = 2;
  localparam int S1P  = S1 / P1K;           // 13
  localparam int K2   = 5;
  localparam int S2   = S1P - K2 + 1;       // 9
  localparam int P2K  = 3;
  localparam int S2P  = S2 / P2K;           // 3
  localparam int NLIN = C2 * S2P * S2P;     // 45

  localparam logic [3:0] L_CONV1 = 4'd0, L_BN1 = 4'd1, L_CONV2 = 4'd2, L_BN2 = 4'd3, L_LIN = 4'd4;

  value_bus_t img [1];
  value_bus_t c1 [C1];
  value_bus_t b1 [C1];
  value_bus_t r1 [C1];
  value_bus_t p1 [C1];
  value_bus_t c2, b2, r2, p2;
  value_bus_t lin [N_CLASS];

  assign img[0] = in_bus;

  conv_layer_00 #(.C_IN(1), .C_OUT(C1), .H(IMG), .W(IMG), .K(K1)) u_conv1 (
    .clk, .rst_n, .in_bus(img), .out_bus(c1),
    .cfg_we(cfg_we && cfg_layer == L_CONV1), .cfg_addr, .cfg_data
  );
  batchnorm_00 #(.LANES(C1)) u_bn1 (
    .clk, .rst_n, .in_bus(c1), .out_bus(b1),
    .cfg_we(cfg_we && cfg_layer == L_BN1), .cfg_addr, .cfg_data
  );
  relu_00 #(.LANES(C1)) u_relu1 (.clk, .rst_n, .in_bus(b1), .out_bus(r1));
  maxpool_00 #(.LANES(C1), .H(S1), .W(S1), .K(P1K), .STRIDE(P1K)) u_pool1 (
    .clk, .rst_n, .in_bus(r1), .out_bus(p1)
  );
  conv_layer_01 #(.C_IN(C1), .C_OUT(C2), .H(S1P), .W(S1P), .K(K2)) u_conv2 (
    .clk, .rst_n, .in_bus(p1), .out_bus(c2),
    .cfg_we(cfg_we && cfg_layer == L_CONV2), .cfg_addr, .cfg_data
  );
  batchnorm_11 #(.C(C2), .HW(S2 * S2)) u_bn2 (
    .clk, .rst_n, .in_bus(c2), .out_bus(b2),
    .cfg_we(cfg_we && cfg_layer == L_BN2), .cfg_addr, .cfg_data
  );
  relu_11 u_relu2 (.clk, .rst_n, .in_bus(b2), .out_bus(r2));
  maxpool_11 #(.C(C2), .H(S2), .W(S2), .K(P2K), .STRIDE(P2K)) u_pool2 (
    .clk, .rst_n, .in_bus(r2), .out_bus(p2)
  );
  linear_10 #(.N_IN(NLIN), .N_OUT(N_CLASS)) u_linear (
    .clk, .rst_n, .in_bus(p2), .out_bus(lin),
    .cfg_we(cfg_we && cfg_layer == L_LIN), .cfg_addr, .cfg_data
  );
  softmax_00 #(.C(N_CLASS)) u_softmax (.clk, .rst_n, .in_bus(lin), .out_bus);
endmodule
