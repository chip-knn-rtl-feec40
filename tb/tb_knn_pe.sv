// tb_knn_pe: end-to-end test of one processing element on the memory model.
//   A  D=2, K=5, 128-bit port, 16-word tiles (32 points, two per word),
//      sort_factor 4, 4 tiles with a partial last tile, memory with gaps;
//   B  D=8, K=10, 128-bit port, 32-word tiles (16 points, two words per
//      point), sort_factor 1 (no local merger), 3 tiles;
//   C  all defaults (D=16, K=10, 512-bit port, 128 KB tiles, sort_factor 3),
//      3 tiles with a partial last tile.
// Each runs a Euclidean and then a Manhattan query. The streamed result must
// equal the K nearest points computed by the reference model, nearest
// first, with ids. The test also requires that the three stages overlapped
// (cycles with Load_Buf, Dist_Calc and Top_K_Sort all busy) and that the
// result stream was held by the consumer at least once.
module tb_knn_pe;
  import knn_pkg::*;
  import tb_fp_pkg::*;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  logic start;
  metric_e metric;
  logic out_ready;
  always @(posedge clk) out_ready <= ($urandom % 4) != 0;

  initial begin
    #200000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  `define PE_INST(N, DD, KK, PW, BB, SFV, BK, GAP, TILES, NPTS) \
    localparam int K_``N = KK; \
    localparam int B_``N = BB / 4 / DD; \
    float_t q_``N [DD]; \
    logic arv_``N, arr_``N, rv_``N, rr_``N, rl_``N, ov_``N, dn_``N, bz_``N; \
    logic [63:0] ara_``N; \
    logic [31:0] arl_``N; \
    logic [PW-1:0] rd_``N; \
    knn_item_t oi_``N; \
    int gaps_``N, overlap_``N, held_``N; \
    knn_item_t got_``N[$]; \
    knn_pe #(.D(DD), .K(KK), .PORT_WIDTH(PW), .BUF_BYTES(BB), .SORT_FACTOR(SFV)) dut_``N ( \
      .clk, .rst_n, .start, .num_tiles(TILES), .num_points(NPTS), .id_base(32'd1000 * BK), \
      .metric, .query(q_``N), \
      .ar_valid(arv_``N), .ar_ready(arr_``N), .ar_addr(ara_``N), .ar_len(arl_``N), \
      .r_valid(rv_``N), .r_ready(rr_``N), .r_data(rd_``N), .r_last(rl_``N), \
      .out_valid(ov_``N), .out_ready(out_ready), .out_item(oi_``N), .done(dn_``N), .busy(bz_``N)); \
    mem_bank_model #(.PORT_WIDTH(PW), .BANK(BK), .LATENCY(6), .GAP_PCT(GAP)) mem_``N ( \
      .clk, .rst_n, .ar_valid(arv_``N), .ar_ready(arr_``N), .ar_addr(ara_``N), .ar_len(arl_``N), \
      .r_valid(rv_``N), .r_ready(rr_``N), .r_data(rd_``N), .r_last(rl_``N), .gaps(gaps_``N)); \
    initial begin \
      overlap_``N = 0; held_``N = 0; \
      for (int d = 0; d < DD; d++) q_``N[d] = gen_float(BK + 50, d); \
    end \
    always @(posedge clk) begin \
      if (dut_``N.l_busy && dut_``N.c_busy && dut_``N.s_busy) overlap_``N++; \
      if (ov_``N && !out_ready) held_``N++; \
      if (ov_``N && out_ready) got_``N.push_back(oi_``N); \
    end \
    task automatic check_``N(); \
      knn_item_t all[$]; \
      all.delete(); \
      for (int j = 0; j < NPTS; j++) begin \
        logic [31:0] xs[$], qs[$]; \
        knn_item_t it; \
        xs.delete(); qs.delete(); \
        for (int d = 0; d < DD; d++) begin xs.push_back(gen_float(BK, j*DD + d)); qs.push_back(q_``N[d]); end \
        it.distance = ref_dist(xs, qs, metric == METRIC_EUCLIDEAN, PW/32); \
        it.id = 1000 * BK + j; \
        all.push_back(it); \
      end \
      all.sort() with (item.distance); \
      checks++; \
      if (got_``N.size() != KK) begin failures++; $display(`"N: %0d results`", got_``N.size()); end \
      for (int k = 0; k < KK && k < got_``N.size(); k++) begin \
        checks++; \
        if (got_``N[k] !== all[k]) begin \
          failures++; \
          if (failures < 10) $display(`"N rank %0d: got %h exp %h`", k, got_``N[k], all[k]); \
        end \
      end \
      got_``N.delete(); \
    endtask

  `PE_INST(a, 2, 5, 128, 256, 4, 1, 20, 4, 123)
  `PE_INST(b, 8, 10, 128, 512, 1, 2, 0, 3, 48)
  `PE_INST(c, 16, 10, 512, 131072, 3, 3, 0, 3, 6044)

  initial begin
    int t0, ta, tb, tc;
    start = 0; metric = METRIC_EUCLIDEAN;
    repeat (3) @(posedge clk);
    #1 rst_n = 1;
    for (int m = 0; m < 2; m++) begin
      metric = m ? METRIC_MANHATTAN : METRIC_EUCLIDEAN;
      @(posedge clk); #1 start = 1;
      @(posedge clk); #1 start = 0;
      t0 = $time / 10; ta = -1; tb = -1; tc = -1;
      while ((ta < 0 || tb < 0 || tc < 0) && $time / 10 - t0 < 40000) begin
        @(posedge clk); #1;
        if (dn_a) ta = $time / 10 - t0;
        if (dn_b) tb = $time / 10 - t0;
        if (dn_c) tc = $time / 10 - t0;
      end
      $display("metric %0d: cycles A %0d  B %0d  C %0d", m, ta, tb, tc);
      check_a(); check_b(); check_c();
      // C: (3 tiles + 2) steps, each bounded by its slowest stage
      // (Top_K_Sort: (2048/3 + 10) items at 3 cycles), plus merge and output.
      checks++;
      if (tc < 0 || tc > 5 * 2200 + 300) begin failures++; $display("C too slow: %0d", tc); end
    end
    checks += 4;
    if (overlap_a == 0 || overlap_b == 0) begin failures++; $display("stages never overlapped"); end
    if (held_a + held_b + held_c == 0) begin failures++; $display("output never held"); end
    if (gaps_a == 0) begin failures++; $display("memory gaps never seen"); end
    if (overlap_c == 0) begin failures++; $display("C stages never overlapped"); end
    $display("overlap cycles A %0d B %0d C %0d, held %0d, gaps %0d", overlap_a, overlap_b, overlap_c,
             held_a + held_b + held_c, gaps_a);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
