// input_ctrl_seq_filter: the InputCtrl_SeqFilter process with its BRAM, one
// per input channel of ConvLayer_01. The BRAM holds the H x W channel at
// addresses 0..H*W-1 and, after it, the K x K weights of every filter for
// this channel (filter f at H*W + f*K*K). Weights are written through the
// cfg port, using the layer's weight address ((f*C_IN + CIDX)*K + ky)*K + kx;
// addresses of other channels are ignored. The channel is stored as it
// arrives; then, for filter f = 0..C_OUT-1, for every output position
// (row-major, stride 1) and every window slot (row-major), port A reads the
// pixel and port B the weight, and both are put out together, one pair per
// cycle, last on the final slot of each window. Holding image and weights
// in one BRAM and the filter-by-filter order follow the reference design;
// the address map is this design's choice.
// Timing: first pair 1 cycle after the last value is stored, then
// K*K*HO*WO*C_OUT consecutive cycles. Weights must be written while idle.
module input_ctrl_seq_filter
  import cnn_pkg::*;
#(
  parameter int H     = 13,
  parameter int W     = 13,
  parameter int K     = 5,
  parameter int C_OUT = 5,
  parameter int C_IN  = 3,
  parameter int CIDX  = 0
) (
  input  logic        clk,
  input  logic        rst_n,
  input  value_bus_t  in_bus,
  output value_bus_t  out_val,
  output value_bus_t  out_wt,
  input  logic        cfg_we,
  input  logic [11:0] cfg_addr,
  input  logic [31:0] cfg_data
);
  localparam int HO    = H - K + 1;
  localparam int WO    = W - K + 1;
  localparam int KK    = K * K;
  localparam int HW    = H * W;
  localparam int DEPTH = HW + C_OUT * KK;
  localparam int AW    = $clog2(DEPTH);

  logic [AW-1:0] wcnt;
  logic [15:0]   f, oy, ox, k;
  logic          emit;
  logic          rd_en_q, rd_last_q;
  logic [AW-1:0] addr_a, addr_b, cfg_bram_addr;
  logic          cfg_hit;
  logic [31:0]   rdata_a, rdata_b;
  logic          last_slot, last_win;

  always_comb begin
    int fq, r;
    fq = int'(cfg_addr) / (C_IN * KK);
    r  = int'(cfg_addr) % (C_IN * KK);
    cfg_hit       = cfg_we && fq < C_OUT && r / KK == CIDX;
    cfg_bram_addr = AW'(HW + fq * KK + r % KK);
    addr_a    = AW'((int'(oy) + int'(k) / K) * W + int'(ox) + int'(k) % K);
    addr_b    = AW'(HW + int'(f) * KK + int'(k));
    last_slot = k == 16'(KK - 1);
    last_win  = f == 16'(C_OUT - 1) && oy == 16'(HO - 1) && ox == 16'(WO - 1);
  end

  bram_dp #(.DEPTH(DEPTH), .WIDTH(32)) u_bram (
    .clk,
    .a_en(emit || in_bus.en), .a_we(!emit && in_bus.en),
    .a_addr(emit ? addr_a : wcnt), .a_wdata(in_bus.val), .a_rdata(rdata_a),
    .b_en(emit || cfg_hit), .b_we(!emit && cfg_hit),
    .b_addr(emit ? addr_b : cfg_bram_addr), .b_wdata(cfg_data), .b_rdata(rdata_b)
  );

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      wcnt      <= '0;
      emit      <= 1'b0;
      f         <= '0;
      oy        <= '0;
      ox        <= '0;
      k         <= '0;
      rd_en_q   <= 1'b0;
      rd_last_q <= 1'b0;
    end else begin
      rd_en_q   <= emit;
      rd_last_q <= emit && last_slot;
      if (!emit) begin
        if (in_bus.en) begin
          if (wcnt == AW'(HW - 1)) begin
            wcnt <= '0;
            emit <= 1'b1;
          end else begin
            wcnt <= wcnt + 1'b1;
          end
        end
      end else if (!last_slot) begin
        k <= k + 1'b1;
      end else begin
        k <= '0;
        if (last_win) begin
          emit <= 1'b0;
          f    <= '0;
          oy   <= '0;
          ox   <= '0;
        end else if (ox != 16'(WO - 1)) begin
          ox <= ox + 1'b1;
        end else begin
          ox <= '0;
          if (oy != 16'(HO - 1)) begin
            oy <= oy + 1'b1;
          end else begin
            oy <= '0;
            f  <= f + 1'b1;
          end
        end
      end
    end
  end

  assign out_val = '{en: rd_en_q, last: rd_last_q, val: rdata_a};
  assign out_wt  = '{en: rd_en_q, last: rd_last_q, val: rdata_b};

  assert property (@(posedge clk) disable iff (!rst_n) !(emit && in_bus.en))
    else $error("input_ctrl_seq_filter: input arrived while emitting windows");
  assert property (@(posedge clk) disable iff (!rst_n) !(emit && cfg_hit))
    else $error("input_ctrl_seq_filter: weight written while emitting windows");
endmodule
