// dist_unit: partial distance between M feature values of a data point and
// the matching M values of the query (Eq. (1) of CHIP-KNN).
//
// Each of the M lanes forms x - q and then |x - q| (Manhattan) or
// (x - q)^2 (Euclidean); a balanced tree of single-precision adders sums the
// lanes. The lanes are the multiply-accumulate ("MAC") units drawn in the
// distance-calculation block of the architecture figure. The unit is purely
// combinational: the caller registers the result. When M is not a power of
// two the tree is padded with zeros. The metric is a run-time input here; in
// the document it is fixed when the accelerator is generated.
module dist_unit
  import knn_pkg::*;
#(
  parameter int unsigned M = 16   // feature values summed per call
) (
  input  metric_e        metric,
  input  float_t [M-1:0] x,       // data point features
  input  float_t [M-1:0] q,       // query features
  output float_t         distance // partial distance
);

  localparam int unsigned NP = (M <= 1) ? 1 : (1 << $clog2(M));

  // Heap-ordered adder tree: node n has children 2n+1 and 2n+2, the NP
  // leaves sit at NP-1 .. 2NP-2.
  float_t tree [2*NP-1];

  for (genvar l = 0; l < NP; l++) begin : g_lane
    if (l < M) begin : g_used
      float_t diff, sq;
      fp32_add u_sub (.a(x[l]), .b({~q[l][31], q[l][30:0]}), .y(diff));
      fp32_mul u_sq  (.a(diff), .b(diff), .y(sq));
      assign tree[NP-1+l] = (metric == METRIC_EUCLIDEAN) ? sq : {1'b0, diff[30:0]};
    end else begin : g_pad
      assign tree[NP-1+l] = '0;
    end
  end

  for (genvar n = 0; n < NP - 1; n++) begin : g_node
    fp32_add u_add (.a(tree[2*n+1]), .b(tree[2*n+2]), .y(tree[n]));
  end

  assign distance = tree[0];

endmodule
