// tb_chip_knn_top: end-to-end test of the multi-PE accelerator at reduced
// size: 3 PEs, D=4, K=5, 128-bit ports, 32-point tiles, sort_factor 2,
// 3 tiles per PE with partial partitions (96, 90 and 70 points). Bank 1
// leaves random gaps in its read data. Four queries are run, alternating
// Euclidean and Manhattan distance, each with a new query vector. The
// result must equal the K nearest of all points computed by the reference
// model, with their ids (p*num_tiles*B + j for point j of partition p).
// The test counts, and requires at least once each: overlap of all three
// pipeline stages in a PE, masked points of a partial tile, memory gaps,
// a PE held off by the global merger, a local merge and a metric switch.
module tb_chip_knn_top;
  import knn_pkg::*;
  import tb_fp_pkg::*;

  localparam int P = 3, DD = 4, KK = 5, PW = 128, BB = 512, SFV = 2, TILES = 3;
  localparam int B = BB / 4 / DD;
  localparam int PTS [P] = '{96, 90, 70};

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  initial begin
    #200000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  logic          start;
  logic [31:0]   pe_points [P];
  metric_e       metric;
  float_t        query [DD];
  logic          arv [P], arr [P], rv [P], rr [P], rl [P];
  logic [63:0]   ara [P];
  logic [31:0]   arl [P];
  logic [PW-1:0] rd [P];
  knn_item_t     nn [KK];
  logic          done, busy;
  int            gaps [P];

  chip_knn_top #(.D(DD), .K(KK), .PORT_WIDTH(PW), .BUF_BYTES(BB), .SORT_FACTOR(SFV), .NUM_PE(P)) dut (
    .clk, .rst_n, .start, .num_tiles(TILES), .pe_points, .metric, .query,
    .m_ar_valid(arv), .m_ar_ready(arr), .m_ar_addr(ara), .m_ar_len(arl),
    .m_r_valid(rv), .m_r_ready(rr), .m_r_data(rd), .m_r_last(rl),
    .nn, .done, .busy);

  for (genvar p = 0; p < P; p++) begin : g_mem
    mem_bank_model #(.PORT_WIDTH(PW), .BANK(p), .LATENCY(5 + 3 * p), .GAP_PCT(p == 1 ? 15 : 0)) u_mem (
      .clk, .rst_n, .ar_valid(arv[p]), .ar_ready(arr[p]), .ar_addr(ara[p]), .ar_len(arl[p]),
      .r_valid(rv[p]), .r_ready(rr[p]), .r_data(rd[p]), .r_last(rl[p]), .gaps(gaps[p]));
  end

  // Mechanism counters.
  int n_overlap = 0, n_masked = 0, n_held = 0, n_merge = 0, n_switch = 0;
  always @(posedge clk) begin
    if (dut.g_pe[0].u_pe.l_busy && dut.g_pe[0].u_pe.c_busy && dut.g_pe[0].u_pe.s_busy) n_overlap++;
    if (dut.g_pe[2].u_pe.g_bank[0].accept && dut.g_pe[2].u_pe.g_bank[0].f_lp >= 70 &&
        dut.g_pe[2].u_pe.g_bank[0].f_idx < B / SFV) n_masked++;
    for (int p = 0; p < P; p++) if (dut.s_valid[p] && !dut.s_ready[p]) n_held++;
    if (dut.g_pe[1].u_pe.g_merge.u_merge.done) n_merge++;
  end

  initial begin
    metric_e last_metric;
    start = 0;
    for (int p = 0; p < P; p++) pe_points[p] = PTS[p];
    repeat (3) @(posedge clk);
    #1 rst_n = 1;
    for (int r = 0; r < 4; r++) begin
      knn_item_t all[$];
      int t0;
      metric = (r % 2) ? METRIC_MANHATTAN : METRIC_EUCLIDEAN;
      if (r > 0 && metric != last_metric) n_switch++;
      last_metric = metric;
      for (int d = 0; d < DD; d++) query[d] = gen_float(77 + r, d);
      @(posedge clk); #1 start = 1;
      @(posedge clk); #1 start = 0;
      t0 = $time / 10;
      while (!done && $time / 10 - t0 < 20000) begin @(posedge clk); #1; end
      checks++;
      if (!done) begin failures++; $display("query %0d: no done", r); end
      $display("query %0d (metric %0d): %0d cycles", r, metric, $time / 10 - t0);
      all.delete();
      for (int p = 0; p < P; p++)
        for (int j = 0; j < PTS[p]; j++) begin
          logic [31:0] xs[$], qs[$];
          knn_item_t it;
          xs.delete(); qs.delete();
          for (int d = 0; d < DD; d++) begin xs.push_back(gen_float(p, j*DD + d)); qs.push_back(query[d]); end
          it.distance = ref_dist(xs, qs, metric == METRIC_EUCLIDEAN, PW/32);
          it.id = p * TILES * B + j;
          all.push_back(it);
        end
      all.sort() with (item.distance);
      for (int k = 0; k < KK; k++) begin
        checks++;
        if (nn[k] !== all[k]) begin
          failures++;
          if (failures < 10) $display("query %0d rank %0d: got %h exp %h", r, k, nn[k], all[k]);
        end
      end
      @(posedge clk); #1;
      checks++;
      if (busy) begin failures++; $display("busy after done"); end
    end
    $display("mechanisms: overlap %0d masked %0d gaps %0d held %0d merges %0d switches %0d",
             n_overlap, n_masked, gaps[1], n_held, n_merge, n_switch);
    checks += 6;
    if (n_overlap == 0) begin failures++; $display("no stage overlap"); end
    if (n_masked == 0)  begin failures++; $display("no masked points"); end
    if (gaps[1] == 0)   begin failures++; $display("no memory gaps"); end
    if (n_held == 0)    begin failures++; $display("no merger backpressure"); end
    if (n_merge == 0)   begin failures++; $display("no local merge"); end
    if (n_switch == 0)  begin failures++; $display("no metric switch"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
