// knn_pe: one CHIP-KNN processing element. It scans its own partition of the
// search space, one tile of BUF_BYTES at a time, and keeps the K points
// nearest to the query.
//
// Three stages work on consecutive tiles as a coarse-grained pipeline with
// ping-pong buffers: while load_buf fills search buffer (t mod 2) with tile
// t, dist_calc reads tile t-1 from the other search buffer and writes its
// distances to point-distance buffer ((t-1) mod 2), and SORT_FACTOR
// topk_sorters read the distances of tile t-2 from the other point-distance
// buffer. A pipeline step ends when every active stage has finished, so a
// PE needs num_tiles+2 steps, each as long as its slowest stage.
// The point-distance buffer is split cyclically into SORT_FACTOR banks (point
// i of a tile lives in bank i mod SORT_FACTOR); sorter b scans bank b and
// then takes K dummy items, as in the document (B+K sort iterations per
// tile). The sorters keep their top-K across all tiles of the query. With
// SORT_FACTOR > 1 a local_topk_merger combines their lists at the end; with
// SORT_FACTOR = 1 it is left out and sorter 0 is the result.
// Points at tile-local positions beyond num_points (the partial last tile)
// are fed as empty items. A point's id is id_base plus its index within the
// PE's partition. When finished the PE streams its K results, nearest first,
// on out_valid/out_ready and pulses `done` after the last one.
// Tile t is read from byte address t*BUF_BYTES of the PE's memory bank.
// The structure follows the document; the step-by-step pipeline control,
// the bank mapping and the streaming output are this design's own.
module knn_pe
  import knn_pkg::*;
#(
  parameter int unsigned D           = 16,
  parameter int unsigned K           = 10,
  parameter int unsigned PORT_WIDTH  = 512,
  parameter int unsigned BUF_BYTES   = 131072,
  parameter int unsigned SORT_FACTOR = 3,
  parameter int unsigned ADDR_W      = 64,
  localparam int unsigned WORDS       = BUF_BYTES * 8 / PORT_WIDTH,
  localparam int unsigned LANES       = PORT_WIDTH / 32,
  localparam int unsigned DIST_FACTOR = (D <= LANES) ? LANES / D : 1,
  localparam int unsigned DIST_II     = (D <= LANES) ? 1 : D / LANES,
  localparam int unsigned B           = WORDS * DIST_FACTOR / DIST_II
) (
  input  logic                  clk,
  input  logic                  rst_n,
  input  logic                  start,
  input  logic [31:0]           num_tiles,
  input  logic [31:0]           num_points,
  input  id_t                   id_base,
  input  metric_e               metric,
  input  float_t                query [D],
  // off-chip read port (this PE's memory bank)
  output logic                  ar_valid,
  input  logic                  ar_ready,
  output logic [ADDR_W-1:0]     ar_addr,
  output logic [31:0]           ar_len,
  input  logic                  r_valid,
  output logic                  r_ready,
  input  logic [PORT_WIDTH-1:0] r_data,
  input  logic                  r_last,
  // local top-K result stream
  output logic                  out_valid,
  input  logic                  out_ready,
  output knn_item_t             out_item,
  output logic                  done,
  output logic                  busy
);

  localparam int unsigned SF  = SORT_FACTOR;
  localparam int unsigned AW  = (WORDS <= 1) ? 1 : $clog2(WORDS);
  localparam int unsigned IW  = $clog2(B + 1);
  localparam int unsigned BD  = (B + SF - 1) / SF;           // bank depth
  localparam int unsigned BAW = (BD <= 1) ? 1 : $clog2(BD);
  localparam int unsigned FW  = $clog2(BD + K + 1);
  localparam int unsigned KW  = $clog2(K + 1);

  // Points of a tile that fall in bank b.
  function automatic int unsigned bank_count(int unsigned b);
    return (B > b) ? (B - 1 - b) / SF + 1 : 0;
  endfunction

  initial begin
    assert (PORT_WIDTH % 32 == 0 && (BUF_BYTES * 8) % PORT_WIDTH == 0)
      else $error("knn_pe: BUF_BYTES must be a whole number of port words");
    assert ((D <= LANES) ? (LANES % D == 0) : (D % LANES == 0))
      else $error("knn_pe: D must divide or be a multiple of PORT_WIDTH/32");
    assert (SF % DIST_FACTOR == 0)
      else $error("knn_pe: SORT_FACTOR must be a multiple of the distance factor");
  end

  // ---------------------------------------------------------------- control
  typedef enum logic [1:0] {P_IDLE, P_RUN, P_MERGE, P_OUT} pstate_e;
  pstate_e     pstate;
  logic [31:0] step, tiles;
  logic [31:0] npts;
  id_t         base_id;
  logic        step_go;
  logic        l_busy, c_busy, s_busy;
  logic        l_start, c_start, s_start;
  logic        l_done, c_done, s_done;
  logic        merge_start, merge_done;
  logic [KW-1:0] o_cnt;

  assign l_start = step_go && (step < tiles);
  assign c_start = step_go && (step >= 1) && (step <= tiles);
  assign s_start = step_go && (step >= 2);
  assign busy    = (pstate != P_IDLE);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      pstate <= P_IDLE; step <= '0; tiles <= '0; npts <= '0; base_id <= '0;
      step_go <= 1'b0; l_busy <= 1'b0; c_busy <= 1'b0; s_busy <= 1'b0;
      merge_start <= 1'b0; o_cnt <= '0; done <= 1'b0;
    end else begin
      step_go     <= 1'b0;
      merge_start <= 1'b0;
      done        <= 1'b0;
      if (l_start) l_busy <= 1'b1; else if (l_done) l_busy <= 1'b0;
      if (c_start) c_busy <= 1'b1; else if (c_done) c_busy <= 1'b0;
      if (s_start) s_busy <= 1'b1; else if (s_done) s_busy <= 1'b0;
      unique case (pstate)
        P_IDLE: if (start) begin
          tiles   <= num_tiles;
          npts    <= num_points;
          base_id <= id_base;
          step    <= '0;
          if (num_tiles == 0) begin
            pstate      <= P_MERGE;
            merge_start <= 1'b1;
          end else begin
            pstate  <= P_RUN;
            step_go <= 1'b1;
          end
        end
        P_RUN: if (!step_go && !l_busy && !c_busy && !s_busy) begin
          if (step == tiles + 1) begin
            pstate      <= P_MERGE;
            merge_start <= 1'b1;
          end else begin
            step    <= step + 1;
            step_go <= 1'b1;
          end
        end
        P_MERGE: if (merge_done) begin
          pstate <= P_OUT;
          o_cnt  <= '0;
        end
        P_OUT: if (out_ready) begin
          if (o_cnt == KW'(K - 1)) begin
            pstate <= P_IDLE;
            done   <= 1'b1;
          end
          o_cnt <= o_cnt + 1'b1;
        end
        default: pstate <= P_IDLE;
      endcase
    end
  end

  // --------------------------------------------------------------- Load_Buf
  logic                  lb_we;
  logic [AW-1:0]         lb_waddr;
  logic [PORT_WIDTH-1:0] lb_wdata;

  load_buf #(.PORT_WIDTH(PORT_WIDTH), .WORDS(WORDS), .ADDR_W(ADDR_W)) u_load (
    .clk, .rst_n, .start(l_start),
    .addr(ADDR_W'(step) * ADDR_W'(BUF_BYTES)), .done(l_done),
    .ar_valid, .ar_ready, .ar_addr, .ar_len, .r_valid, .r_ready, .r_data, .r_last,
    .buf_we(lb_we), .buf_waddr(lb_waddr), .buf_wdata(lb_wdata)
  );

  // Ping-pong search-space buffers: load writes buffer step[0], dist_calc
  // reads the other one.
  logic [AW-1:0]         dc_raddr;
  logic [PORT_WIDTH-1:0] sb_rdata [2];

  for (genvar i = 0; i < 2; i++) begin : g_sbuf
    sdp_ram #(.WIDTH(PORT_WIDTH), .DEPTH(WORDS)) u_ram (
      .clk, .we(lb_we && (step[0] == 1'(i))), .waddr(lb_waddr), .wdata(lb_wdata),
      .raddr(dc_raddr), .rdata(sb_rdata[i])
    );
  end

  // -------------------------------------------------------------- Dist_Calc
  logic          dc_valid;
  logic [IW-1:0] dc_idx;
  float_t        dc_dist [DIST_FACTOR];

  dist_calc #(.D(D), .PORT_WIDTH(PORT_WIDTH), .WORDS(WORDS)) u_dist (
    .clk, .rst_n, .start(c_start), .metric, .query,
    .buf_raddr(dc_raddr), .buf_rdata(step[0] ? sb_rdata[0] : sb_rdata[1]),
    .out_valid(dc_valid), .out_idx(dc_idx), .out_dist(dc_dist), .done(c_done)
  );

  // Bank write position of the next distance group.
  localparam int unsigned WBW = $clog2(SF + 1);
  logic [WBW-1:0]          wb_base;
  logic [BAW-1:0]          wb_addr;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      wb_base <= '0; wb_addr <= '0;
    end else if (c_start) begin
      wb_base <= '0; wb_addr <= '0;
    end else if (dc_valid) begin
      if (int'(wb_base) + DIST_FACTOR >= SF) begin
        wb_base <= '0;
        wb_addr <= wb_addr + 1'b1;
      end else begin
        wb_base <= wb_base + WBW'(DIST_FACTOR);
      end
    end
  end

  // ------------------------------------------------------------- Top_K_Sort
  knn_item_t sorter_best [SF][K];
  logic      sorter_busy [SF];
  logic      feed_active [SF];

  for (genvar b = 0; b < SF; b++) begin : g_bank
    localparam int unsigned CNT = bank_count(b);

    logic          pd_we;
    float_t        pd_wdata;
    logic [BAW-1:0] pd_raddr;
    float_t        pd_rdata [2];

    // Which distance lane, if any, lands in this bank.
    always_comb begin
      pd_we    = 1'b0;
      pd_wdata = '0;
      for (int f = 0; f < DIST_FACTOR; f++)
        if (dc_valid && int'(wb_base) + f == b) begin
          pd_we    = 1'b1;
          pd_wdata = dc_dist[f];
        end
    end

    // Ping-pong point-distance banks: dist_calc writes buffer ~step[0],
    // the sorter reads buffer step[0].
    for (genvar i = 0; i < 2; i++) begin : g_pd
      sdp_ram #(.WIDTH(32), .DEPTH(BD)) u_ram (
        .clk, .we(pd_we && (step[0] != 1'(i))), .waddr(wb_addr), .wdata(pd_wdata),
        .raddr(pd_raddr), .rdata(pd_rdata[i])
      );
    end

    // Feeder: CNT distances of this bank, then K dummy items.
    logic          f_active, f_warm;
    logic [FW-1:0] f_idx;
    logic [IW+31:0] f_lp;          // PE-local point index
    logic          in_valid, in_ready, accept;
    knn_item_t     in_item;

    assign accept   = in_valid && in_ready;
    assign in_valid = f_active && f_warm;
    assign pd_raddr = BAW'(accept ? f_idx + 1'b1 : f_idx);
    assign feed_active[b] = f_active;

    always_comb begin
      in_item = ITEM_EMPTY;
      if (f_idx < FW'(CNT) && f_lp < (IW+32)'(npts)) begin
        in_item.distance = step[0] ? pd_rdata[1] : pd_rdata[0];
        in_item.id   = base_id + id_t'(f_lp);
      end
    end

    always_ff @(posedge clk or negedge rst_n) begin
      if (!rst_n) begin
        f_active <= 1'b0; f_warm <= 1'b0; f_idx <= '0; f_lp <= '0;
      end else if (s_start) begin
        f_active <= 1'b1; f_warm <= 1'b0; f_idx <= '0;
        f_lp     <= (IW+32)'(step - 2) * (IW+32)'(B) + (IW+32)'(b);
      end else if (f_active) begin
        f_warm <= 1'b1;
        if (accept) begin
          f_idx <= f_idx + 1'b1;
          f_lp  <= f_lp + (IW+32)'(SF);
          if (f_idx == FW'(CNT + K - 1)) f_active <= 1'b0;
        end
      end
    end

    topk_sorter #(.K(K)) u_sorter (
      .clk, .rst_n, .clear(start && pstate == P_IDLE), .in_valid, .in_ready,
      .in_item, .best(sorter_best[b]), .busy(sorter_busy[b])
    );
  end

  always_comb begin
    s_done = s_busy && !s_start;
    for (int b = 0; b < SF; b++)
      if (feed_active[b] || sorter_busy[b]) s_done = 1'b0;
  end

  // ----------------------------------------------------------- local merger
  knn_item_t final_best [K];

  if (SF > 1) begin : g_merge
    local_topk_merger #(.K(K), .SF(SF)) u_merge (
      .clk, .rst_n, .start(merge_start), .lists(sorter_best),
      .best(final_best), .done(merge_done)
    );
  end else begin : g_nomerge
    // A single sorter's list is already sorted: no merge step.
    assign final_best = sorter_best[0];
    always_ff @(posedge clk or negedge rst_n)
      if (!rst_n) merge_done <= 1'b0;
      else        merge_done <= merge_start;
  end

  assign out_valid = (pstate == P_OUT);
  assign out_item  = final_best[o_cnt];

  // Unused by the logic, kept for debug visibility of the distance stream.
  logic unused_ok;
  assign unused_ok = &{1'b0, dc_idx};

endmodule
