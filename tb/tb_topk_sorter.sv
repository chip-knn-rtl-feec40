// tb_topk_sorter: self-checking test of topk_sorter for K=10 and K=5 (odd).
// Several runs feed random distances with distinct ids, some runs shorter
// than K, followed by K dummy items; the kept list must equal the K smallest
// inputs in ascending order, with empty entries after them. The cycle
// distance between accepted items must be 3 (II of the document).
module tb_topk_sorter;
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

  localparam int KA = 10, KB = 5;
  logic      clear;
  logic      in_valid;
  logic      rdy_a, rdy_b, busy_a, busy_b;
  knn_item_t in_item;
  knn_item_t best_a [KA];
  knn_item_t best_b [KB];

  topk_sorter #(.K(KA)) dut_a (.clk, .rst_n, .clear, .in_valid, .in_ready(rdy_a),
                               .in_item, .best(best_a), .busy(busy_a));
  topk_sorter #(.K(KB)) dut_b (.clk, .rst_n, .clear, .in_valid, .in_ready(rdy_b),
                               .in_item, .best(best_b), .busy(busy_b));

  knn_item_t ref_q[$];
  int        last_acc, n_acc;

  // Both sorters run in lock step, so one handshake drives both.
  knn_item_t cur;

  task automatic push();
    // Called one step after a clock edge; the item is taken at the first
    // edge where both sorters are ready.
    in_item  = cur;
    in_valid = 1'b1;
    while (!(rdy_a && rdy_b)) begin
      @(posedge clk);
      #1;
    end
    @(posedge clk);
    if (n_acc > 0) begin
      checks++;
      if ($time / 10 - last_acc != 3) begin
        failures++;
        $display("II error: %0d cycles", $time / 10 - last_acc);
      end
    end
    last_acc = $time / 10;
    n_acc++;
    #1;
    in_valid = 1'b0;
  endtask

  task automatic check_run(int n);
    knn_item_t s[$];
    s = ref_q;
    s.sort() with (item.distance);
    for (int i = 0; i < KA; i++) begin
      knn_item_t e;
      e = (i < s.size()) ? s[i] : ITEM_EMPTY;
      checks++;
      if (best_a[i] !== e) begin
        failures++;
        if (failures < 10) $display("K=10 run n=%0d pos %0d: got %h exp %h", n, i, best_a[i], e);
      end
    end
    for (int i = 0; i < KB; i++) begin
      knn_item_t e;
      e = (i < s.size()) ? s[i] : ITEM_EMPTY;
      checks++;
      if (best_b[i] !== e) begin
        failures++;
        if (failures < 10) $display("K=5 run n=%0d pos %0d: got %h exp %h", n, i, best_b[i], e);
      end
    end
  endtask

  initial begin
    clear = 0; in_valid = 0; in_item = ITEM_EMPTY;
    repeat (3) @(posedge clk);
    #1;
    rst_n = 1;
    for (int r = 0; r < 60; r++) begin
      int n;
      n = (r < 4) ? r * 3 : 5 + $urandom % 200;
      clear = 1; @(posedge clk); #1; clear = 0; #1;
      ref_q.delete();
      n_acc = 0;
      for (int i = 0; i < n; i++) begin
        cur.distance = {1'b0, 7'($urandom % 120), 24'($urandom)};
        if (r % 3 == 0) cur.distance = {1'b0, 31'(n - i)} << 8;   // descending input
        if (r % 3 == 1) cur.distance = {1'b0, 31'(i + 1)} << 8;   // ascending input
        cur.id = id_t'(i);
        ref_q.push_back(cur);
        push();
      end
      for (int i = 0; i < KA; i++) begin
        cur = ITEM_EMPTY;
        push();
      end
      while (busy_a || busy_b) begin
        @(posedge clk);
        #1;
      end
      check_run(n);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
