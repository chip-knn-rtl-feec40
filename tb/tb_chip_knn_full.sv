// tb_chip_knn_full: one complete query on the accelerator at its default
// size (28 PEs, D=16, K=10, 512-bit ports, 128 KB tiles of 2048 points,
// sort_factor 3). Each PE searches one tile; PE 27 holds only 2000 points,
// so the search space has 57,296 points. The result must equal the 10
// nearest points (Euclidean) computed by the reference model, and the query
// must finish within three pipeline steps of about 2,100 cycles plus the
// local and global merges.
module tb_chip_knn_full;
  import knn_pkg::*;
  import tb_fp_pkg::*;

  localparam int P = 28, DD = 16, KK = 10, PW = 512, B = 2048, TILES = 1;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  initial begin
    #100000000;
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

  chip_knn_top dut (
    .clk, .rst_n, .start, .num_tiles(TILES), .pe_points, .metric, .query,
    .m_ar_valid(arv), .m_ar_ready(arr), .m_ar_addr(ara), .m_ar_len(arl),
    .m_r_valid(rv), .m_r_ready(rr), .m_r_data(rd), .m_r_last(rl),
    .nn, .done, .busy);

  for (genvar p = 0; p < P; p++) begin : g_mem
    mem_bank_model #(.PORT_WIDTH(PW), .BANK(p), .LATENCY(8)) u_mem (
      .clk, .rst_n, .ar_valid(arv[p]), .ar_ready(arr[p]), .ar_addr(ara[p]), .ar_len(arl[p]),
      .r_valid(rv[p]), .r_ready(rr[p]), .r_data(rd[p]), .r_last(rl[p]), .gaps(gaps[p]));
  end

  initial begin
    knn_item_t all[$];
    int t0, cyc;
    start = 0;
    metric = METRIC_EUCLIDEAN;
    for (int p = 0; p < P; p++) pe_points[p] = (p == P - 1) ? 2000 : B;
    for (int d = 0; d < DD; d++) query[d] = gen_float(999, d);
    repeat (3) @(posedge clk);
    #1 rst_n = 1;
    @(posedge clk); #1 start = 1;
    @(posedge clk); #1 start = 0;
    t0 = $time / 10;
    while (!done && $time / 10 - t0 < 20000) begin @(posedge clk); #1; end
    cyc = $time / 10 - t0;
    $display("query finished after %0d cycles", cyc);
    checks++;
    if (!done || cyc > 3 * 2200 + 1200) begin failures++; $display("too slow or no done"); end
    all.delete();
    for (int p = 0; p < P; p++)
      for (int j = 0; j < int'(pe_points[p]); j++) begin
        logic [31:0] xs[$], qs[$];
        knn_item_t it;
        xs.delete(); qs.delete();
        for (int d = 0; d < DD; d++) begin xs.push_back(gen_float(p, j*DD + d)); qs.push_back(query[d]); end
        it.distance = ref_dist(xs, qs, 1'b1, PW/32);
        it.id = p * TILES * B + j;
        all.push_back(it);
      end
    all.sort() with (item.distance);
    for (int k = 0; k < KK; k++) begin
      checks++;
      if (nn[k] !== all[k]) begin
        failures++;
        $display("rank %0d: got %h exp %h", k, nn[k], all[k]);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
