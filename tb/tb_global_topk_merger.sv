// tb_global_topk_merger: self-checking test of global_topk_merger with P=4
// streams of K=5 items. Each stream source presents its items with random
// gaps and holds them while ready is low; the result must be the K smallest
// of all 20 items, nearest first. The test also counts cycles in which a
// source was held off (valid without ready) and requires some.
module tb_global_topk_merger;
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

  localparam int K = 5, P = 4;
  logic      start;
  logic      s_valid [P];
  logic      s_ready [P];
  knn_item_t s_item  [P];
  knn_item_t nn [K];
  logic      done;
  knn_item_t src [P][K];
  int        sent [P];
  int        held = 0;

  global_topk_merger #(.K(K), .P(P)) dut (.clk, .rst_n, .start, .s_valid, .s_ready, .s_item, .nn, .done);

  // Stream sources: present the next item, sometimes after a gap.
  always_ff @(posedge clk) begin
    for (int p = 0; p < P; p++) begin
      if (s_valid[p] && !s_ready[p]) held++;
      if (start) begin
        sent[p]    <= 0;
        s_valid[p] <= 1'b0;
      end else if (s_valid[p] && s_ready[p]) begin
        sent[p]    <= sent[p] + 1;
        s_valid[p] <= 1'b0;
      end else if (!s_valid[p] && sent[p] < K && ($urandom % 3 != 0)) begin
        s_valid[p] <= 1'b1;
        s_item[p]  <= src[p][sent[p]];
      end
    end
  end

  initial begin
    start = 0;
    for (int p = 0; p < P; p++) begin s_valid[p] = 0; sent[p] = K; s_item[p] = ITEM_EMPTY; end
    repeat (3) @(posedge clk);
    #1 rst_n = 1;
    for (int r = 0; r < 30; r++) begin
      knn_item_t q[$];
      int t0;
      q.delete();
      for (int p = 0; p < P; p++)
        for (int k = 0; k < K; k++) begin
          src[p][k] = '{distance: {1'b0, 7'($urandom % 100), 24'($urandom)}, id: id_t'(p*1000 + k)};
          q.push_back(src[p][k]);
        end
      q.sort() with (item.distance);
      @(posedge clk); #1 start = 1;
      @(posedge clk); #1 start = 0;
      t0 = $time / 10;
      while (!done && $time / 10 - t0 < 2000) begin @(posedge clk); #1; end
      checks++;
      if (!done) begin failures++; $display("no done"); end
      for (int k = 0; k < K; k++) begin
        checks++;
        if (nn[k] !== q[k]) begin
          failures++;
          if (failures < 10) $display("pos %0d got %h exp %h", k, nn[k], q[k]);
        end
      end
    end
    checks++;
    if (held == 0) begin failures++; $display("backpressure never seen"); end
    $display("held-off cycles: %0d", held);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
