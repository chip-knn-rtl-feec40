// tb_table3_configs: runs one PE at each of the seven U280 design points of
// the CHIP-KNN evaluation (D = 2 .. 128, K = 10, 128 KB tiles, with the port
// width and sort factor chosen for each D) on one full tile, Euclidean
// distance. For each it checks the 10 nearest neighbours against the
// reference model and measures how many cycles Load_Buf, Dist_Calc and
// Top_K_Sort take on the tile. The measured cycles are printed next to the
// per-tile cycles reported for the original accelerator (Table IV values in
// the `ref_*` arrays) and must agree within 12% for Load_Buf and Dist_Calc;
// Top_K_Sort must not be slower than reported by more than 12%.
module tb_table3_configs;
  import knn_pkg::*;
  import tb_fp_pkg::*;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  logic start;

  initial begin
    #400000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  localparam int NCFG = 7;
  localparam int ref_ld [NCFG] = '{4315, 2247, 2300, 2264, 2264, 2247, 4215};
  localparam int ref_dc [NCFG] = '{4230, 2096, 2172, 2193, 2313, 2027, 4259};
  localparam int ref_so [NCFG] = '{4257, 2105, 2147, 2102, 1043, 1568, 2951};
  int cyc_ld [NCFG], cyc_dc [NCFG], cyc_so [NCFG];
  logic fin [NCFG];

  `define CFG_INST(N, IDX, DD, PW, SFV) \
    localparam int B_``N = 131072 / 4 / DD; \
    float_t q_``N [DD]; \
    logic arv_``N, arr_``N, rv_``N, rr_``N, rl_``N, ov_``N, dn_``N, bz_``N; \
    logic [63:0] ara_``N; \
    logic [31:0] arl_``N; \
    logic [PW-1:0] rd_``N; \
    knn_item_t oi_``N; \
    int gaps_``N; \
    knn_item_t got_``N[$]; \
    knn_pe #(.D(DD), .K(10), .PORT_WIDTH(PW), .BUF_BYTES(131072), .SORT_FACTOR(SFV)) dut_``N ( \
      .clk, .rst_n, .start, .num_tiles(32'd1), .num_points(B_``N), .id_base(32'd0), \
      .metric(METRIC_EUCLIDEAN), .query(q_``N), \
      .ar_valid(arv_``N), .ar_ready(arr_``N), .ar_addr(ara_``N), .ar_len(arl_``N), \
      .r_valid(rv_``N), .r_ready(rr_``N), .r_data(rd_``N), .r_last(rl_``N), \
      .out_valid(ov_``N), .out_ready(1'b1), .out_item(oi_``N), .done(dn_``N), .busy(bz_``N)); \
    mem_bank_model #(.PORT_WIDTH(PW), .BANK(IDX), .LATENCY(8)) mem_``N ( \
      .clk, .rst_n, .ar_valid(arv_``N), .ar_ready(arr_``N), .ar_addr(ara_``N), .ar_len(arl_``N), \
      .r_valid(rv_``N), .r_ready(rr_``N), .r_data(rd_``N), .r_last(rl_``N), .gaps(gaps_``N)); \
    initial begin \
      for (int d = 0; d < DD; d++) q_``N[d] = gen_float(IDX + 40, d); \
      cyc_ld[IDX] = 0; cyc_dc[IDX] = 0; cyc_so[IDX] = 0; fin[IDX] = 0; \
    end \
    always @(posedge clk) if (rst_n) begin \
      if (dut_``N.l_busy) cyc_ld[IDX]++; \
      if (dut_``N.c_busy) cyc_dc[IDX]++; \
      if (dut_``N.s_busy) cyc_so[IDX]++; \
      if (ov_``N) got_``N.push_back(oi_``N); \
      if (dn_``N) fin[IDX] = 1; \
    end \
    task automatic check_``N(); \
      knn_item_t all[$]; \
      all.delete(); \
      for (int j = 0; j < B_``N; j++) begin \
        logic [31:0] xs[$], qs[$]; \
        knn_item_t it; \
        xs.delete(); qs.delete(); \
        for (int d = 0; d < DD; d++) begin xs.push_back(gen_float(IDX, j*DD + d)); qs.push_back(q_``N[d]); end \
        it.distance = ref_dist(xs, qs, 1'b1, PW/32); \
        it.id = j; \
        all.push_back(it); \
      end \
      all.sort() with (item.distance); \
      checks++; \
      if (got_``N.size() != 10) begin failures++; $display(`"D=DD: %0d results`", got_``N.size()); end \
      for (int k = 0; k < 10 && k < got_``N.size(); k++) begin \
        checks++; \
        if (got_``N[k] !== all[k]) begin \
          failures++; \
          if (failures < 10) $display(`"D=DD rank %0d: got %h exp %h`", k, got_``N[k], all[k]); \
        end \
      end \
    endtask

  `CFG_INST(d2,   0,   2, 256, 12)
  `CFG_INST(d4,   1,   4, 512, 12)
  `CFG_INST(d8,   2,   8, 512, 6)
  `CFG_INST(d16,  3,  16, 512, 3)
  `CFG_INST(d32,  4,  32, 512, 3)
  `CFG_INST(d64,  5,  64, 512, 1)
  `CFG_INST(d128, 6, 128, 256, 1)

  function automatic bit near(int got, int want, int pct);
    return got * 100 <= want * (100 + pct) && got * 100 >= want * (100 - pct);
  endfunction

  initial begin
    int DIMS [NCFG];
    bit all_fin;
    DIMS = '{2, 4, 8, 16, 32, 64, 128};
    start = 0;
    repeat (3) @(posedge clk);
    #1 rst_n = 1;
    @(posedge clk); #1 start = 1;
    @(posedge clk); #1 start = 0;
    do begin
      @(posedge clk); #1;
      all_fin = 1;
      for (int i = 0; i < NCFG; i++) all_fin &= fin[i];
    end while (!all_fin);
    check_d2(); check_d4(); check_d8(); check_d16(); check_d32(); check_d64(); check_d128();
    $display("   D   Load_Buf (ref)   Dist_Calc (ref)   Top_K_Sort (ref)");
    for (int i = 0; i < NCFG; i++) begin
      $display("%4d   %5d (%5d)    %5d (%5d)     %5d (%5d)", DIMS[i], cyc_ld[i], ref_ld[i],
               cyc_dc[i], ref_dc[i], cyc_so[i], ref_so[i]);
      checks += 3;
      if (!near(cyc_ld[i], ref_ld[i], 12)) begin failures++; $display("  Load_Buf off"); end
      if (!near(cyc_dc[i], ref_dc[i], 12)) begin failures++; $display("  Dist_Calc off"); end
      if (cyc_so[i] * 100 > ref_so[i] * 112) begin failures++; $display("  Top_K_Sort slower"); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
