// plus_ctrl: the PlusCtrl process. Accumulates every enabled value into an
// internal float32 register. When a value arrives with last set, the sum
// including that value is put on the output (with last set) for one cycle
// and the accumulator restarts at zero. One cycle from the last input to
// the output. The output's last flag marks the end of a group; it is this
// design's choice, the document only says the buffer is output.
module plus_ctrl
  import cnn_pkg::*;
(
  input  logic       clk,
  input  logic       rst_n,
  input  value_bus_t in_bus,
  output value_bus_t out_bus
);
  logic [31:0] acc;
  logic [31:0] sum;

  assign sum = fp_add(acc, in_bus.val);

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      acc     <= FP_ZERO;
      out_bus <= VB_IDLE;
    end else begin
      out_bus.en   <= in_bus.en & in_bus.last;
      out_bus.last <= in_bus.en & in_bus.last;
      if (in_bus.en) begin
        if (in_bus.last) begin
          out_bus.val <= sum;
          acc         <= FP_ZERO;
        end else begin
          acc <= sum;
        end
      end
    end
  end
endmodule
