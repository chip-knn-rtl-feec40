// tb_dist_unit: self-checking test of dist_unit with 16 lanes and with 3
// lanes (zero-padded tree). Random points and queries are applied under
// both metrics; the result must match, bit for bit, the reference computed
// lane by lane and summed in the same tree order with correctly rounded
// single-precision steps.
module tb_dist_unit;
  import knn_pkg::*;
  import tb_fp_pkg::*;

  localparam int M1 = 16, M2 = 3;
  metric_e         metric;
  float_t [M1-1:0] x1, q1;
  float_t [M2-1:0] x2, q2;
  float_t          d1, d2;
  int checks = 0, failures = 0;

  dist_unit #(.M(M1)) dut1 (.metric, .x(x1), .q(q1), .distance(d1));
  dist_unit #(.M(M2)) dut2 (.metric, .x(x2), .q(q2), .distance(d2));

  function automatic float_t rnd_float();
    return {1'($urandom), 8'(122 + ($urandom % 8)), 23'($urandom)};
  endfunction

  initial begin
    #100000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 4000; i++) begin
      logic [31:0] xa[$], qa[$], xb[$], qb[$];
      float_t e1, e2;
      xa.delete(); qa.delete(); xb.delete(); qb.delete();
      metric = (i % 2) ? METRIC_EUCLIDEAN : METRIC_MANHATTAN;
      for (int l = 0; l < M1; l++) begin
        x1[l] = rnd_float(); q1[l] = (i % 7 == 0) ? x1[l] : rnd_float();
        xa.push_back(x1[l]); qa.push_back(q1[l]);
      end
      for (int l = 0; l < M2; l++) begin
        x2[l] = rnd_float(); q2[l] = rnd_float();
        xb.push_back(x2[l]); qb.push_back(q2[l]);
      end
      #1;
      e1 = ref_partial(xa, qa, metric == METRIC_EUCLIDEAN);
      e2 = ref_partial(xb, qb, metric == METRIC_EUCLIDEAN);
      checks += 2;
      if (d1 !== e1) begin
        failures++;
        if (failures < 10) $display("MISMATCH M=16 metric=%0d got %h exp %h", metric, d1, e1);
      end
      if (d2 !== e2) begin
        failures++;
        if (failures < 10) $display("MISMATCH M=3 metric=%0d got %h exp %h", metric, d2, e2);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
