// maxpool_00: max pooling with channel-parallel buses (MaxPool_00). Each
// lane stores its H x W channel in a BRAM through an input controller,
// which then streams every K x K window (step STRIDE) two values per cycle
// into a running-maximum unit. Output pixels appear one per ceil(K*K/2)
// cycles on all lanes together; last marks the final pixel. Storing the
// channel first follows the reference; the internal split is this
// design's, as the reference does not describe it.
// Timing: the last output comes H*W + 2 + ceil(K*K/2)*HO*WO cycles after
// the first input, counting both (1016 for maxPool1), as in the reference.
module maxpool_00
  import cnn_pkg::*;
#(
  parameter int LANES  = 3,
  parameter int H      = 26,
  parameter int W      = 26,
  parameter int K      = 2,
  parameter int STRIDE = 2
) (
  input  logic       clk,
  input  logic       rst_n,
  input  value_bus_t in_bus  [LANES],
  output value_bus_t out_bus [LANES]
);
  localparam int HO = (H - K) / STRIDE + 1;
  localparam int WO = (W - K) / STRIDE + 1;

  for (genvar c = 0; c < LANES; c++) begin : g_lane
    value_bus_t win_a, win_b;
    logic       busy;
    input_ctrl_par_filter #(.H(H), .W(W), .K(K), .STRIDE(STRIDE), .CH(1)) u_ictrl (
      .clk, .rst_n, .in_bus(in_bus[c]), .out_a(win_a), .out_b(win_b), .busy
    );
    max_ctrl #(.N_OUT(HO * WO)) u_max (.clk, .rst_n, .in_a(win_a), .in_b(win_b), .out_bus(out_bus[c]));
  end
endmodule
