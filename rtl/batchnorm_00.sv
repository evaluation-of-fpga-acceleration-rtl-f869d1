// batchnorm_00: batch normalisation with channel-parallel buses
// (BatchNorm_00). Every lane c applies
//   y = (x - mean[c]) * inv_std[c] * gamma[c] + beta[c]
// in four float32 register stages (subtract, multiply, multiply, add), so a
// value leaves 4 cycles after it enters and a whole channel of HW values
// takes HW + 4 cycles, matching the reference latency. inv_std[c] is
// 1/sqrt(var[c] + eps), computed off-line and loaded like the other
// constants: cfg address 4c + 0 mean, 4c + 1 inv_std, 4c + 2 gamma,
// 4c + 3 beta. Loading 1/sqrt as a constant is this design's choice.
module batchnorm_00
  import cnn_pkg::*;
#(
  parameter int LANES = 3
) (
  input  logic        clk,
  input  logic        rst_n,
  input  value_bus_t  in_bus  [LANES],
  output value_bus_t  out_bus [LANES],
  input  logic        cfg_we,
  input  logic [11:0] cfg_addr,
  input  logic [31:0] cfg_data
);
  logic [31:0] cst [LANES*4];
  value_bus_t  s1 [LANES];
  value_bus_t  s2 [LANES];
  value_bus_t  s3 [LANES];

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      for (int i = 0; i < LANES * 4; i++) cst[i] <= (i % 4 == 0 || i % 4 == 3) ? FP_ZERO : FP_ONE;
    end else if (cfg_we && int'(cfg_addr) < LANES * 4) begin
      cst[int'(cfg_addr)] <= cfg_data;
    end
  end

  for (genvar c = 0; c < LANES; c++) begin : g_lane
    always_ff @(posedge clk) begin
      if (!rst_n) begin
        s1[c]      <= VB_IDLE;
        s2[c]      <= VB_IDLE;
        s3[c]      <= VB_IDLE;
        out_bus[c] <= VB_IDLE;
      end else begin
        s1[c]      <= '{en: in_bus[c].en, last: in_bus[c].last, val: fp_sub(in_bus[c].val, cst[4*c])};
        s2[c]      <= '{en: s1[c].en, last: s1[c].last, val: fp_mul(s1[c].val, cst[4*c+1])};
        s3[c]      <= '{en: s2[c].en, last: s2[c].last, val: fp_mul(s2[c].val, cst[4*c+2])};
        out_bus[c] <= '{en: s3[c].en, last: s3[c].last, val: fp_add(s3[c].val, cst[4*c+3])};
      end
    end
  end
endmodule
