// input_ctrl_par_filter: the InputCtrl_ParFilter process with its BRAM.
// It first stores CH whole H x W channels, value by value as they arrive,
// in a dual-port BRAM. Then, for every channel and every output position
// (row-major, step STRIDE), it streams the K x K window in row-major order,
// two values per cycle: port A reads window slot 2p, port B slot 2p+1. When
// K*K is odd the last pair's B slot re-reads slot 2p. last is set on the
// final pair of each window. After the final window it is ready to load
// the next input. Storing the whole channel first and the two-values-per-
// cycle read follow the reference design; slot order, the odd-slot rule and
// CH > 1 (used by the sequential max-pooling version) are this design's.
// Timing: the first pair appears 1 cycle after the last value is stored;
// then one pair per cycle, ceil(K*K/2) cycles per window. No value may
// arrive while busy is high.
module input_ctrl_par_filter
  import cnn_pkg::*;
#(
  parameter int H      = 28,
  parameter int W      = 28,
  parameter int K      = 3,
  parameter int STRIDE = 1,
  parameter int CH     = 1
) (
  input  logic       clk,
  input  logic       rst_n,
  input  value_bus_t in_bus,
  output value_bus_t out_a,
  output value_bus_t out_b,
  output logic       busy
);
  localparam int HO    = (H - K) / STRIDE + 1;
  localparam int WO    = (W - K) / STRIDE + 1;
  localparam int KK    = K * K;
  localparam int NP    = (KK + 1) / 2;
  localparam int DEPTH = CH * H * W;
  localparam int AW    = (DEPTH > 1) ? $clog2(DEPTH) : 1;
  localparam int PW    = (NP > 1) ? $clog2(NP) : 1;

  logic [AW-1:0] wcnt;
  logic [15:0]   ch, oy, ox;
  logic [PW-1:0] p;
  logic          emit;
  logic          rd_en_q, rd_last_q;
  logic [AW-1:0] addr_a, addr_b;
  logic [31:0]   rdata_a, rdata_b;
  logic          last_pair, last_win;

  function automatic logic [AW-1:0] win_addr(input logic [15:0] c, input logic [15:0] y,
                                             input logic [15:0] x, input int slot);
    int ky, kx;
    ky = slot / K;
    kx = slot % K;
    return AW'(int'(c) * H * W + (int'(y) * STRIDE + ky) * W + int'(x) * STRIDE + kx);
  endfunction

  always_comb begin
    addr_a    = win_addr(ch, oy, ox, 2 * int'(p));
    addr_b    = win_addr(ch, oy, ox, (2 * int'(p) + 1 < KK) ? 2 * int'(p) + 1 : 2 * int'(p));
    last_pair = p == PW'(NP - 1);
    last_win  = ch == 16'(CH - 1) && oy == 16'(HO - 1) && ox == 16'(WO - 1);
  end

  bram_dp #(.DEPTH(DEPTH), .WIDTH(32)) u_bram (
    .clk,
    .a_en(emit || in_bus.en), .a_we(!emit && in_bus.en),
    .a_addr(emit ? addr_a : wcnt), .a_wdata(in_bus.val), .a_rdata(rdata_a),
    .b_en(emit), .b_we(1'b0), .b_addr(addr_b), .b_wdata(32'h0), .b_rdata(rdata_b)
  );

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      wcnt      <= '0;
      emit      <= 1'b0;
      ch        <= '0;
      oy        <= '0;
      ox        <= '0;
      p         <= '0;
      rd_en_q   <= 1'b0;
      rd_last_q <= 1'b0;
    end else begin
      rd_en_q   <= emit;
      rd_last_q <= emit && last_pair;
      if (!emit) begin
        if (in_bus.en) begin
          if (wcnt == AW'(DEPTH - 1)) begin
            wcnt <= '0;
            emit <= 1'b1;
          end else begin
            wcnt <= wcnt + 1'b1;
          end
        end
      end else begin
        if (!last_pair) begin
          p <= p + 1'b1;
        end else begin
          p <= '0;
          if (last_win) begin
            emit <= 1'b0;
            ch   <= '0;
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
              ch <= ch + 1'b1;
            end
          end
        end
      end
    end
  end

  assign out_a = '{en: rd_en_q, last: rd_last_q, val: rdata_a};
  assign out_b = '{en: rd_en_q, last: rd_last_q, val: rdata_b};
  assign busy  = emit;

  assert property (@(posedge clk) disable iff (!rst_n) !(emit && in_bus.en))
    else $error("input_ctrl_par_filter: input arrived while emitting windows");
endmodule
