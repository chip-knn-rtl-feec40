// tb_local_topk_merger: self-checking test of local_topk_merger with three
// lists of K=10 (the default sort_factor) and with five lists of K=5.
// Random lists, some with empty entries, are merged; the result must be the
// K smallest of all entries in ascending order, and the merge must take
// (SF*K + K) items at three cycles each plus a few cycles of start-up.
module tb_local_topk_merger;
  import knn_pkg::*;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  initial begin
    #20000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  localparam int K1 = 10, S1 = 3, K2 = 5, S2 = 5;
  logic      start;
  knn_item_t l1 [S1][K1];
  knn_item_t l2 [S2][K2];
  knn_item_t b1 [K1];
  knn_item_t b2 [K2];
  logic      d1, d2;

  local_topk_merger #(.K(K1), .SF(S1)) dut1 (.clk, .rst_n, .start, .lists(l1), .best(b1), .done(d1));
  local_topk_merger #(.K(K2), .SF(S2)) dut2 (.clk, .rst_n, .start, .lists(l2), .best(b2), .done(d2));

  initial begin
    start = 0;
    repeat (3) @(posedge clk);
    #1 rst_n = 1;
    for (int r = 0; r < 40; r++) begin
      knn_item_t q1[$], q2[$];
      int t0, t1, t2;
      t1 = -1; t2 = -1;
      q1.delete(); q2.delete();
      for (int s = 0; s < S1; s++)
        for (int k = 0; k < K1; k++) begin
          l1[s][k] = (($urandom % 6) == 0) ? ITEM_EMPTY :
                     '{distance: {1'b0, 7'($urandom % 100), 24'($urandom)}, id: id_t'(s*100 + k)};
          q1.push_back(l1[s][k]);
        end
      for (int s = 0; s < S2; s++)
        for (int k = 0; k < K2; k++) begin
          l2[s][k] = '{distance: {1'b0, 7'($urandom % 100), 24'($urandom)}, id: id_t'(s*100 + k)};
          q2.push_back(l2[s][k]);
        end
      q1.sort() with (item.distance);
      q2.sort() with (item.distance);
      @(posedge clk); #1 start = 1;
      @(posedge clk); #1 start = 0;
      t0 = $time / 10;
      while (t1 < 0 || t2 < 0) begin
        @(posedge clk); #1;
        if (d1) t1 = $time / 10 - t0;
        if (d2) t2 = $time / 10 - t0;
        if ($time / 10 - t0 > 1000) break;
      end
      for (int k = 0; k < K1; k++) begin
        checks++;
        if (b1[k].distance !== q1[k].distance ||
            (q1[k].id != ID_INVALID && b1[k] !== q1[k])) begin
          failures++;
          if (failures < 10) $display("SF=3 pos %0d got %h exp %h", k, b1[k], q1[k]);
        end
      end
      for (int k = 0; k < K2; k++) begin
        checks++;
        if (b2[k] !== q2[k]) begin
          failures++;
          if (failures < 10) $display("SF=5 pos %0d got %h exp %h", k, b2[k], q2[k]);
        end
      end
      checks += 2;
      if (t1 < (S1*K1 + K1) * 3 || t1 > (S1*K1 + K1) * 3 + 4) begin
        failures++; $display("SF=3 latency %0d", t1);
      end
      if (t2 < (S2*K2 + K2) * 3 || t2 > (S2*K2 + K2) * 3 + 4) begin
        failures++; $display("SF=5 latency %0d", t2);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
