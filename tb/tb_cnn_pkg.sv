// tb_cnn_pkg: checks the float32 functions of cnn_pkg against the
// simulator's own real arithmetic. Sums, products and quotients of two
// float32 values computed in double precision and rounded once to float32
// are correctly rounded, so those results must match bit for bit; exp must
// agree within 2 units in the last place. Operands are random normal floats
// in a range where no result over- or underflows.
`timescale 1ns/1ps
module tb_cnn_pkg;
  import cnn_pkg::*;
  import tb_pkg::*;
  int checks = 0, failures = 0;

  function automatic logic [31:0] rnd_fp(input int emin, input int emax);
    logic [31:0] r;
    int e;
    e = emin + int'($urandom % (emax - emin + 1));
    r = {1'($urandom), 8'(e), 23'($urandom)};
    return r;
  endfunction


  task automatic chk(input string what, input logic [31:0] got, input logic [31:0] exp_v,
                     input logic [31:0] a, input logic [31:0] b);
    checks++;
    if (got !== exp_v) begin
      failures++;
      if (failures < 10)
        $display("FAIL %s a=%h b=%h got=%h exp=%h", what, a, b, got, exp_v);
    end
  endtask

  initial begin
    logic [31:0] a, b, g, e;
    int ulp;
    for (int i = 0; i < 20000; i++) begin
      a = rnd_fp(100, 150);
      b = (i % 4 == 0) ? {~a[31], a[30:8], 8'($urandom)} : rnd_fp(100, 150);
      chk("add", fp_add(a, b), r2f(f2r(a) + f2r(b)), a, b);
      chk("mul", fp_mul(a, b), r2f(f2r(a) * f2r(b)), a, b);
      chk("div", fp_div(a, b), r2f(f2r(a) / f2r(b)), a, b);
      chk("gt", {31'h0, fp_gt(a, b)}, {31'h0, (f2r(a) > f2r(b))}, a, b);
      a = rnd_fp(100, 132);
      g = fp_exp(a);
      e = r2f($exp(f2r(a)));
      ulp = int'(g) - int'(e);
      checks++;
      if (ulp > 2 || ulp < -2) begin
        failures++;
        if (failures < 10) $display("FAIL exp a=%h got=%h exp=%h", a, g, e);
      end
    end
    chk("add0", fp_add(32'h3f80_0000, 32'hbf80_0000), 32'h0, 0, 0);
    chk("exp0", fp_exp(32'h0), FP_ONE, 0, 0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
