// max_ctrl: running maximum over one pooling window. Window values arrive
// two per cycle (buses A and B, valid together, last on the window's final
// pair); the larger of the pair is compared with the maximum so far, which
// restarts with each window. After the final pair the window maximum is
// put out. Outputs are counted and last is set on the N_OUT-th, marking the
// end of the pooled input. One cycle latency.
module max_ctrl
  import cnn_pkg::*;
#(
  parameter int N_OUT = 169
) (
  input  logic       clk,
  input  logic       rst_n,
  input  value_bus_t in_a,
  input  value_bus_t in_b,
  output value_bus_t out_bus
);
  localparam int NW = $clog2(N_OUT + 1);
  logic [31:0]   m;
  logic          first;
  logic [NW-1:0] cnt;
  logic [31:0]   pair_max, win_max;

  always_comb begin
    pair_max = fp_max(in_a.val, in_b.val);
    win_max  = first ? pair_max : fp_max(m, pair_max);
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      m       <= FP_ZERO;
      first   <= 1'b1;
      cnt     <= '0;
      out_bus <= VB_IDLE;
    end else begin
      out_bus.en   <= in_a.en && in_a.last;
      out_bus.last <= in_a.en && in_a.last && cnt == NW'(N_OUT - 1);
      if (in_a.en) begin
        m     <= win_max;
        first <= in_a.last;
        if (in_a.last) begin
          out_bus.val <= win_max;
          cnt         <= (cnt == NW'(N_OUT - 1)) ? '0 : cnt + 1'b1;
        end
      end
    end
  end
endmodule
