// bram_dp: true dual-port block RAM, the storage behind every input
// controller. Each port has its own control bus (enable, write, address,
// data) and its own read result, as in the block diagrams of the input
// controllers, so two values can be read in one cycle.
// Timing: reads are registered, the data appears one cycle after the
// address; a read and a write to the same address on one port return the
// old contents. Writing the same address from both ports at once is not
// allowed. The read latency and the collision rules are this design's
// choice; the dual-port use follows the reference design.
module bram_dp #(
  parameter int DEPTH = 784,
  parameter int WIDTH = 32,
  localparam int AW = (DEPTH > 1) ? $clog2(DEPTH) : 1
) (
  input  logic             clk,
  input  logic             a_en,
  input  logic             a_we,
  input  logic [AW-1:0]    a_addr,
  input  logic [WIDTH-1:0] a_wdata,
  output logic [WIDTH-1:0] a_rdata,
  input  logic             b_en,
  input  logic             b_we,
  input  logic [AW-1:0]    b_addr,
  input  logic [WIDTH-1:0] b_wdata,
  output logic [WIDTH-1:0] b_rdata
);
  logic [WIDTH-1:0] mem [DEPTH];

  always_ff @(posedge clk) begin
    if (a_en) begin
      if (a_we) mem[a_addr] <= a_wdata;
      a_rdata <= mem[a_addr];
    end
  end

  always_ff @(posedge clk) begin
    if (b_en) begin
      if (b_we) mem[b_addr] <= b_wdata;
      b_rdata <= mem[b_addr];
    end
  end

  assert property (@(posedge clk) !(a_en && a_we && b_en && b_we && a_addr == b_addr))
    else $error("bram_dp: both ports write address %0d", a_addr);
endmodule
