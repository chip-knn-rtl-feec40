// tb_fp32_mul: self-checking test of fp32_mul. Random operands with moderate
// exponents, equal exponents, near-cancellation and zero operands are
// applied; each result must equal, bit for bit, the correctly rounded
// single-precision value of a * b computed in double precision.
module tb_fp32_mul;
  import knn_pkg::*;
  import tb_fp_pkg::*;

  float_t a, b, y;
  int checks = 0, failures = 0;

  fp32_mul dut (.a, .b, .y);

  function automatic float_t rnd_float(int emin, int span);
    return {1'($urandom), 8'(emin + ($urandom % span)), 23'($urandom)};
  endfunction

  task automatic check_one(float_t x1, float_t x2);
    float_t exp_y;
    a = x1; b = x2;
    #1;
    exp_y = fmul(x1, x2);
    checks++;
    if (y !== exp_y) begin
      failures++;
      if (failures < 10)
        $display("MISMATCH %h * %h: got %h expected %h", x1, x2, y, exp_y);
    end
  endtask

  initial begin
    #100000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 20000; i++) check_one(rnd_float(100, 50), rnd_float(100, 50));
    for (int i = 0; i < 5000; i++) begin
      float_t t;
      t = rnd_float(120, 10);
      check_one(t, {t[31], t[30:23], 23'($urandom)});
      check_one(t, {~t[31], t[30:23], 23'($urandom)});
      check_one(t, {~t[31], t[30:0] ^ 31'($urandom % 8)});
    end
    check_one(32'h3F80_0000, 32'h0000_0000);
    check_one(32'h0000_0000, 32'hC040_0000);
    check_one(32'h4040_0000, 32'hC040_0000);
    check_one(32'h0000_0000, 32'h0000_0000);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
