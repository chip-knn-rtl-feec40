// chip_knn_top: the multi-PE CHIP-KNN accelerator. NUM_PE processing
// elements each search their own partition of the data set, held in their
// own off-chip memory bank, and stream their local top-K lists to a global
// top-K merger, which returns the K nearest neighbours of the query.
//
// Operation: the host places partition p of the search space (points of D
// single-precision features, row-major) at address 0 of bank p, sets
// num_tiles (tiles of BUF_BYTES per PE, the same for all PEs), pe_points[p]
// (points actually present in partition p, at most num_tiles*B), metric and
// the query, and pulses `start`. Point j of partition p gets the id
// p*num_tiles*B + j, where B = BUF_BYTES/(4*D) points per tile. When `done`
// pulses, nn[0..K-1] holds the nearest neighbours, nearest first; empty
// entries carry DIST_MAX and ID_INVALID.
// Each bank has its own read port (request: ar_*, data: r_*). The PEs run
// in parallel; the merger consumes PE 0's list first and then the others in
// order, costing O(NUM_PE*K) cycles after the last PE finishes.
// Defaults: the document's Alveo U280 design for D=16, K=10 (28 PEs,
// 512-bit ports, 128 KB tiles, sort_factor 3). The document builds one
// kernel per die plus one merger kernel joined by streams; here they are one
// module with the same connections.
module chip_knn_top
  import knn_pkg::*;
#(
  parameter int unsigned D           = 16,
  parameter int unsigned K           = 10,
  parameter int unsigned PORT_WIDTH  = 512,
  parameter int unsigned BUF_BYTES   = 131072,
  parameter int unsigned SORT_FACTOR = 3,
  parameter int unsigned NUM_PE      = 28,
  parameter int unsigned ADDR_W      = 64,
  localparam int unsigned B          = BUF_BYTES / 4 / D
) (
  input  logic                  clk,
  input  logic                  rst_n,
  input  logic                  start,
  input  logic [31:0]           num_tiles,
  input  logic [31:0]           pe_points [NUM_PE],
  input  metric_e               metric,
  input  float_t                query [D],
  // one read port per memory bank
  output logic                  m_ar_valid [NUM_PE],
  input  logic                  m_ar_ready [NUM_PE],
  output logic [ADDR_W-1:0]     m_ar_addr  [NUM_PE],
  output logic [31:0]           m_ar_len   [NUM_PE],
  input  logic                  m_r_valid  [NUM_PE],
  output logic                  m_r_ready  [NUM_PE],
  input  logic [PORT_WIDTH-1:0] m_r_data   [NUM_PE],
  input  logic                  m_r_last   [NUM_PE],
  // result
  output knn_item_t             nn [K],
  output logic                  done,
  output logic                  busy
);

  logic      s_valid [NUM_PE];
  logic      s_ready [NUM_PE];
  knn_item_t s_item  [NUM_PE];
  logic      pe_done [NUM_PE];
  logic      pe_busy [NUM_PE];
  logic      m_done, m_busy;

  for (genvar p = 0; p < NUM_PE; p++) begin : g_pe
    knn_pe #(
      .D(D), .K(K), .PORT_WIDTH(PORT_WIDTH), .BUF_BYTES(BUF_BYTES),
      .SORT_FACTOR(SORT_FACTOR), .ADDR_W(ADDR_W)
    ) u_pe (
      .clk, .rst_n, .start, .num_tiles, .num_points(pe_points[p]),
      .id_base(id_t'(p) * num_tiles * id_t'(B)), .metric, .query,
      .ar_valid(m_ar_valid[p]), .ar_ready(m_ar_ready[p]), .ar_addr(m_ar_addr[p]),
      .ar_len(m_ar_len[p]), .r_valid(m_r_valid[p]), .r_ready(m_r_ready[p]),
      .r_data(m_r_data[p]), .r_last(m_r_last[p]),
      .out_valid(s_valid[p]), .out_ready(s_ready[p]), .out_item(s_item[p]),
      .done(pe_done[p]), .busy(pe_busy[p])
    );
  end

  global_topk_merger #(.K(K), .P(NUM_PE)) u_merge (
    .clk, .rst_n, .start, .s_valid, .s_ready, .s_item, .nn, .done(m_done)
  );

  // Merger is active from start until its done pulse.
  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n)      m_busy <= 1'b0;
    else if (start)  m_busy <= 1'b1;
    else if (m_done) m_busy <= 1'b0;

  assign done = m_done;
  always_comb begin
    busy = m_busy;
    for (int p = 0; p < NUM_PE; p++) busy |= pe_busy[p];
  end

  // PE done pulses are not needed: completion is seen through the merger.
  logic unused_ok;
  always_comb begin
    unused_ok = 1'b0;
    for (int p = 0; p < NUM_PE; p++) unused_ok |= pe_done[p];
  end

endmodule
