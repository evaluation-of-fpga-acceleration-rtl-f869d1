// linear_10: fully connected layer with a sequential input bus and parallel
// outputs (Linear_10). The N_IN inputs arrive one per cycle, in the
// flattened (channel, row, column) order. Every output f has its own
// WeightValue, which multiplies the current input by W[f][i], and its own
// PlusCtrl, which accumulates the products; after the N_IN-th input each
// sum gets its bias and all N_OUT results leave in the same cycle with
// last set. Weights and biases live in registers: cfg address f*N_IN + i
// for W[f][i], N_OUT*N_IN + f for the bias of f. The per-output split into
// multiply, accumulate and bias is this design's; the reference only gives
// the layer's equation and latency.
// Timing: results N_IN + 3 cycles after the first input (reference:
// h*w*c + 5).
module linear_10
  import cnn_pkg::*;
#(
  parameter int N_IN  = 45,
  parameter int N_OUT = 2
) (
  input  logic        clk,
  input  logic        rst_n,
  input  value_bus_t  in_bus,
  output value_bus_t  out_bus [N_OUT],
  input  logic        cfg_we,
  input  logic [11:0] cfg_addr,
  input  logic [31:0] cfg_data
);
  localparam int IW = $clog2(N_IN + 1);

  logic [31:0]   w [N_OUT*N_IN];
  logic [IW-1:0] i;
  value_bus_t    x;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      for (int j = 0; j < N_OUT * N_IN; j++) w[j] <= FP_ZERO;
    end else if (cfg_we && int'(cfg_addr) < N_OUT * N_IN) begin
      w[int'(cfg_addr)] <= cfg_data;
    end
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      i <= '0;
    end else if (in_bus.en) begin
      i <= (i == IW'(N_IN - 1)) ? '0 : i + 1'b1;
    end
  end

  assign x = '{en: in_bus.en, last: in_bus.en && i == IW'(N_IN - 1), val: in_bus.val};

  for (genvar f = 0; f < N_OUT; f++) begin : g_out
    value_bus_t wt, prod, sum;
    assign wt = '{en: in_bus.en, last: x.last, val: w[f * N_IN + int'(i)]};
    weight_value u_wv (.clk, .rst_n, .val(x), .wt, .out_bus(prod));
    plus_ctrl    u_pc (.clk, .rst_n, .in_bus(prod), .out_bus(sum));
    bias_add #(.N_OUT(1), .BASE(N_OUT * N_IN + f)) u_bias (
      .clk, .rst_n, .in_bus(sum), .out_bus(out_bus[f]), .cfg_we, .cfg_addr, .cfg_data
    );
  end
endmodule
