// fp32_mul: combinational IEEE-754 single-precision multiplier, a * b.
//
// The 24x24-bit significand product is normalised, rounded to nearest with
// ties to even, and packed. Subnormal inputs are read as zero, results below
// the normal range are flushed to signed zero and overflow gives infinity;
// NaN is not handled. The document asks only for single-precision float
// arithmetic; this unit and its simplifications are this design's own. The
// result is available in the same cycle as the operands.
module fp32_mul
  import knn_pkg::*;
(
  input  float_t a,
  input  float_t b,
  output float_t y
);

  logic        s;
  logic [47:0] prod;
  logic [23:0] mant;
  logic        g, st;
  logic [9:0]  e_res;
  logic [24:0] rounded;

  always_comb begin
    s    = a[31] ^ b[31];
    prod = {1'b1, a[22:0]} * {1'b1, b[22:0]};
    e_res = {2'b00, a[30:23]} + {2'b00, b[30:23]} - 10'd127;
    if (prod[47]) begin
      mant  = prod[47:24];
      g     = prod[23];
      st    = |prod[22:0];
      e_res = e_res + 10'd1;
    end else begin
      mant  = prod[46:23];
      g     = prod[22];
      st    = |prod[21:0];
    end
    rounded = {1'b0, mant} + {24'd0, g & (st | mant[0])};
    if (rounded[24]) begin
      rounded = rounded >> 1;
      e_res   = e_res + 10'd1;
    end
    if (a[30:23] == 0 || b[30:23] == 0 || e_res[9] || e_res == 0)
      y = {s, 31'd0};
    else if (e_res >= 10'd255)
      y = {s, 8'hFF, 23'd0};
    else
      y = {s, e_res[7:0], rounded[22:0]};
  end

endmodule
