// fp32_add: combinational IEEE-754 single-precision adder, a + b.
//
// The operands are aligned with three extra bits (guard, round, sticky),
// added or subtracted as magnitudes, normalised and rounded to nearest, ties
// to even. Subnormal inputs are read as zero and results below the normal
// range are flushed to zero; overflow gives infinity. NaN is not produced or
// propagated, since feature data and distances are finite. The document only
// states that the data type is single-precision float; this unit and its
// simplifications are this design's own. The result is available in the same
// cycle as the operands (no pipeline register).
module fp32_add
  import knn_pkg::*;
(
  input  float_t a,
  input  float_t b,
  output float_t y
);

  // Unpacked operands, larger magnitude first.
  logic        sa, sb;
  logic [7:0]  ea, eb;
  logic [23:0] ma, mb;
  logic [7:0]  d;
  logic [26:0] xa, xb;        // {hidden, 23 fraction, guard, round, sticky}
  logic [53:0] shifted;
  logic [27:0] sum;
  logic [4:0]  lz;
  logic [26:0] norm;
  logic [9:0]  e_res;         // signed working exponent
  logic [24:0] rounded;
  logic        round_up;

  always_comb begin
    // Order operands by magnitude.
    if (a[30:0] >= b[30:0]) begin
      sa = a[31]; ea = a[30:23]; ma = {(a[30:23] != 0), a[22:0]};
      sb = b[31]; eb = b[30:23]; mb = {(b[30:23] != 0), b[22:0]};
    end else begin
      sa = b[31]; ea = b[30:23]; ma = {(b[30:23] != 0), b[22:0]};
      sb = a[31]; eb = a[30:23]; mb = {(a[30:23] != 0), a[22:0]};
    end
    if (ea == 0) ma = '0;
    if (eb == 0) mb = '0;

    // Align the smaller operand, collecting shifted-out bits as sticky.
    d  = (eb == 0) ? 8'd0 : ea - eb;
    xa = {ma, 3'b000};
    if (d > 8'd27) shifted = {27'd0, mb, 3'b000};
    else           shifted = {mb, 3'b000, 27'd0} >> d;
    xb = {shifted[53:28], shifted[27] | (|shifted[26:0])};

    // Add or subtract magnitudes.
    if (sa == sb) sum = {1'b0, xa} + {1'b0, xb};
    else          sum = {1'b0, xa} - {1'b0, xb};

    // Normalise.
    lz = '0;
    for (int i = 0; i <= 26; i++)
      if (sum[i]) lz = 5'(26 - i);
    if (sum[27]) begin
      norm  = {sum[27:2], sum[1] | sum[0]};
      e_res = {2'b00, ea} + 10'd1;
    end else begin
      norm  = sum[26:0] << lz;
      e_res = {2'b00, ea} - {5'd0, lz};
    end

    // Round to nearest, ties to even.
    round_up = norm[2] & (norm[1] | norm[0] | norm[3]);
    rounded  = {1'b0, norm[26:3]} + {24'd0, round_up};
    if (rounded[24]) begin
      rounded = rounded >> 1;
      e_res   = e_res + 10'd1;
    end

    // Pack.
    if (sum == 0 || ea == 0)
      y = 32'd0;
    else if (e_res[9] || e_res == 0)
      y = {sa, 31'd0};
    else if (e_res >= 10'd255)
      y = {sa, 8'hFF, 23'd0};
    else
      y = {sa, e_res[7:0], rounded[22:0]};
  end

endmodule
