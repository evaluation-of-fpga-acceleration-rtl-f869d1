// plus_two: the PlusTwo process. Registered float32 sum of two buses that
// are valid in the same cycle; enable and last follow the first bus.
module plus_two
  import cnn_pkg::*;
(
  input  logic       clk,
  input  logic       rst_n,
  input  value_bus_t in_a,
  input  value_bus_t in_b,
  output value_bus_t out_bus
);
  always_ff @(posedge clk) begin
    if (!rst_n) begin
      out_bus <= VB_IDLE;
    end else begin
      out_bus.en   <= in_a.en;
      out_bus.last <= in_a.en & in_a.last;
      if (in_a.en) out_bus.val <= fp_add(in_a.val, in_b.val);
    end
  end

  assert property (@(posedge clk) disable iff (!rst_n) in_a.en == in_b.en)
    else $error("plus_two: operands not valid together");
endmodule
