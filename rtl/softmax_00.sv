// softmax_00: softmax over C parallel lanes (Softmax_00),
//   y[c] = exp(x[c]) / sum_j exp(x[j]).
// The C inputs arrive in the same cycle. Schedule, one step per cycle:
// exp of every lane (1 cycle), the C-1 additions of the sum done one after
// another on a single adder (C-1 cycles), the reciprocal of the sum
// (1 cycle), and a multiply of every exp by it (1 cycle), after which all
// C results leave together with last set. This follows the reference
// latency 1 + (C-1) + 1 + 1. There is no subtraction of the maximum, as in
// the reference equation, so an input above about 88 overflows. Computing
// the quotient as a reciprocal and a product is this design's choice; it
// can differ from a true division by one unit in the last place.
module softmax_00
  import cnn_pkg::*;
#(
  parameter int C = 2
) (
  input  logic       clk,
  input  logic       rst_n,
  input  value_bus_t in_bus  [C],
  output value_bus_t out_bus [C]
);
  typedef enum logic [1:0] {S_IDLE, S_SUM, S_REC, S_MUL} state_t;
  localparam int JW = (C > 1) ? $clog2(C) : 1;

  state_t        st;
  logic [31:0]   e [C];
  logic [31:0]   sum, rec;
  logic [JW-1:0] j;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      st  <= S_IDLE;
      j   <= '0;
      sum <= FP_ZERO;
      rec <= FP_ZERO;
      for (int c = 0; c < C; c++) begin
        e[c]       <= FP_ZERO;
        out_bus[c] <= VB_IDLE;
      end
    end else begin
      for (int c = 0; c < C; c++) out_bus[c] <= VB_IDLE;
      unique case (st)
        S_IDLE: if (in_bus[0].en) begin
          for (int c = 0; c < C; c++) e[c] <= fp_exp(in_bus[c].val);
          sum <= fp_exp(in_bus[0].val);
          j   <= JW'(1 % C);
          st  <= (C > 1) ? S_SUM : S_REC;
        end
        S_SUM: begin
          sum <= fp_add(sum, e[j]);
          if (j == JW'(C - 1)) begin
            j  <= '0;
            st <= S_REC;
          end else begin
            j <= j + 1'b1;
          end
        end
        S_REC: begin
          rec <= fp_div(FP_ONE, sum);
          st  <= S_MUL;
        end
        S_MUL: begin
          for (int c = 0; c < C; c++) out_bus[c] <= '{en: 1'b1, last: 1'b1, val: fp_mul(e[c], rec)};
          st <= S_IDLE;
        end
        default: st <= S_IDLE;
      endcase
    end
  end

  assert property (@(posedge clk) disable iff (!rst_n) !(st != S_IDLE && in_bus[0].en))
    else $error("softmax_00: new input while busy");
endmodule
