// tb_dist_calc: self-checking test of dist_calc in its three regimes:
//   A  defaults (D=16, 512-bit words, 2048 words): one point per word;
//   B  D=2 with 128-bit words: two points per word (dist_factor 2);
//   C  D=8 with 128-bit words: a point spans two words (dist_II 2).
// Each reads a tile buffer (registered read, filled with generated floats)
// and every distance must match the reference bit for bit, under both
// metrics. A tile must take WORDS cycles plus 2 cycles of latency.
module tb_dist_calc;
  import knn_pkg::*;
  import tb_fp_pkg::*;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  logic start;
  metric_e metric;

  initial begin
    #50000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  `define DC_INST(N, DD, PW, WW, BK) \
    logic [$clog2(WW)-1:0] ra_``N; \
    logic [PW-1:0] rd_``N, mem_``N [WW]; \
    logic ov_``N, dn_``N; \
    logic [$clog2(WW*(PW/32)/DD+1)-1:0] oi_``N; \
    localparam int DF_``N = (DD <= PW/32) ? PW/32/DD : 1; \
    float_t od_``N [DF_``N]; \
    float_t q_``N [DD]; \
    int t_``N; \
    dist_calc #(.D(DD), .PORT_WIDTH(PW), .WORDS(WW)) dut_``N ( \
      .clk, .rst_n, .start, .metric, .query(q_``N), .buf_raddr(ra_``N), .buf_rdata(rd_``N), \
      .out_valid(ov_``N), .out_idx(oi_``N), .out_dist(od_``N), .done(dn_``N)); \
    always @(posedge clk) rd_``N <= mem_``N[ra_``N]; \
    initial begin \
      for (int w = 0; w < WW; w++) \
        for (int l = 0; l < PW/32; l++) mem_``N[w][32*l +: 32] = gen_float(BK, w*(PW/32) + l); \
      for (int d = 0; d < DD; d++) q_``N[d] = gen_float(BK + 100, d); \
    end \
    always @(posedge clk) if (rst_n && ov_``N) begin \
      for (int f = 0; f < DF_``N; f++) begin \
        logic [31:0] xs[$], qs[$]; \
        float_t e; \
        int p; \
        xs.delete(); qs.delete(); \
        p = int'(oi_``N) + f; \
        for (int d = 0; d < DD; d++) begin \
          xs.push_back(gen_float(BK, p*DD + d)); \
          qs.push_back(q_``N[d]); \
        end \
        e = ref_dist(xs, qs, metric == METRIC_EUCLIDEAN, PW/32); \
        checks++; \
        if (od_``N[f] !== e) begin \
          failures++; \
          if (failures < 10) $display(`"N point %0d: got %h exp %h`", p, od_``N[f], e); \
        end \
      end \
    end

  `DC_INST(a, 16, 512, 2048, 1)
  `DC_INST(b, 2, 128, 16, 2)
  `DC_INST(c, 8, 128, 32, 3)

  int n_out [3];
  always @(posedge clk) begin
    if (start) for (int i = 0; i < 3; i++) n_out[i] <= 0;
    else begin
      if (ov_a) n_out[0] <= n_out[0] + DF_a;
      if (ov_b) n_out[1] <= n_out[1] + DF_b;
      if (ov_c) n_out[2] <= n_out[2] + DF_c;
    end
  end

  initial begin
    start = 0; metric = METRIC_EUCLIDEAN;
    repeat (3) @(posedge clk);
    #1 rst_n = 1;
    for (int m = 0; m < 2; m++) begin
      int t0;
      metric = m ? METRIC_MANHATTAN : METRIC_EUCLIDEAN;
      @(posedge clk); #1 start = 1;
      @(posedge clk); #1 start = 0;
      t0 = $time / 10; t_a = -1; t_b = -1; t_c = -1;
      while ((t_a < 0 || t_b < 0 || t_c < 0) && $time / 10 - t0 < 5000) begin
        @(posedge clk); #1;
        if (dn_a) t_a = $time / 10 - t0;
        if (dn_b) t_b = $time / 10 - t0;
        if (dn_c) t_c = $time / 10 - t0;
      end
      repeat (2) @(posedge clk);
      #1;
      // Measured from the cycle after the start pulse.
      checks += 6;
      if (t_a != 2048 + 1) begin failures++; $display("A cycles %0d", t_a); end
      if (t_b != 16 + 1)   begin failures++; $display("B cycles %0d", t_b); end
      if (t_c != 32 + 1)   begin failures++; $display("C cycles %0d", t_c); end
      if (n_out[0] != 2048) begin failures++; $display("A count %0d", n_out[0]); end
      if (n_out[1] != 32)   begin failures++; $display("B count %0d", n_out[1]); end
      if (n_out[2] != 16)   begin failures++; $display("C count %0d", n_out[2]); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
