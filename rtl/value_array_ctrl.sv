// value_array_ctrl: the ValueArrayCtrl process. N buses that are valid in
// the same cycle are copied into N registers; over the next N cycles the
// values are put out one per cycle in lane order, with last set on lane
// N-1. A new set may only arrive once the previous one has been sent
// (checked by an assertion); the layers that use this block guarantee it
// because a window takes at least N cycles.
// Timing: lane 0 appears one cycle after the set arrives.
module value_array_ctrl
  import cnn_pkg::*;
#(
  parameter int N = 1
) (
  input  logic       clk,
  input  logic       rst_n,
  input  value_bus_t in_bus [N],
  output value_bus_t out_bus
);
  localparam int IW = (N > 1) ? $clog2(N) : 1;
  logic [31:0]   buf_q [N];
  logic [IW-1:0] idx;
  logic          busy;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      idx     <= '0;
      busy    <= 1'b0;
      out_bus <= VB_IDLE;
    end else begin
      out_bus <= VB_IDLE;
      if (in_bus[0].en) begin
        for (int i = 0; i < N; i++) buf_q[i] <= in_bus[i].val;
        out_bus.en   <= 1'b1;
        out_bus.val  <= in_bus[0].val;
        out_bus.last <= (N == 1);
        busy         <= (N > 1);
        idx          <= IW'(1 % N);
      end else if (busy) begin
        out_bus.en   <= 1'b1;
        out_bus.val  <= buf_q[idx];
        out_bus.last <= idx == IW'(N - 1);
        if (idx == IW'(N - 1)) begin
          busy <= 1'b0;
          idx  <= '0;
        end else begin
          idx <= idx + 1'b1;
        end
      end
    end
  end

  assert property (@(posedge clk) disable iff (!rst_n) !(busy && in_bus[0].en))
    else $error("value_array_ctrl: new set arrived while emitting");
endmodule
