// kernel_ctrl: the KernelCtrl process of a ConvKernel_type00. It holds the
// K*K weights of one (filter, input channel) pair in registers, written
// through the cfg port at BASE + ky*K + kx. Window values arrive two per
// cycle: bus A carries window slot 2p and bus B slot 2p+1. Each value is
// sent on to its branch together with its weight, so each branch gets a
// value bus and a weight bus. The slot counter p restarts after the pair
// that carries last. When K*K is odd the spare B slot of the final pair is
// paired with weight +0.0, so it adds nothing. One cycle latency.
module kernel_ctrl
  import cnn_pkg::*;
#(
  parameter int K    = 3,
  parameter int BASE = 0
) (
  input  logic        clk,
  input  logic        rst_n,
  input  value_bus_t  in_a,
  input  value_bus_t  in_b,
  output value_bus_t  a_val,
  output value_bus_t  a_wt,
  output value_bus_t  b_val,
  output value_bus_t  b_wt,
  input  logic        cfg_we,
  input  logic [11:0] cfg_addr,
  input  logic [31:0] cfg_data
);
  localparam int KK = K * K;
  localparam int NP = (KK + 1) / 2;
  localparam int PW = (NP > 1) ? $clog2(NP) : 1;

  logic [31:0]   w [KK];
  logic [PW-1:0] p;
  logic [31:0]   wa, wb;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      for (int i = 0; i < KK; i++) w[i] <= FP_ZERO;
    end else if (cfg_we && int'(cfg_addr) >= BASE && int'(cfg_addr) < BASE + KK) begin
      w[int'(cfg_addr) - BASE] <= cfg_data;
    end
  end

  always_comb begin
    wa = w[2 * int'(p)];
    wb = (2 * int'(p) + 1 < KK) ? w[2 * int'(p) + 1] : FP_ZERO;
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      p     <= '0;
      a_val <= VB_IDLE;
      a_wt  <= VB_IDLE;
      b_val <= VB_IDLE;
      b_wt  <= VB_IDLE;
    end else begin
      a_val <= in_a;
      b_val <= '{en: in_a.en, last: in_a.last, val: in_b.val};
      a_wt  <= '{en: in_a.en, last: in_a.last, val: wa};
      b_wt  <= '{en: in_a.en, last: in_a.last, val: wb};
      if (in_a.en) p <= in_a.last ? '0 : p + 1'b1;
    end
  end
endmodule
