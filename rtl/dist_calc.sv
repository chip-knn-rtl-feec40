// dist_calc: the Dist_Calc stage of a PE. It streams one tile out of the
// local search-space buffer, one PORT_WIDTH-bit word per cycle, and emits the
// distance of every buffered point to the query.
//
// The buffer holds the tile exactly as it lies in memory: points one after
// another, D single-precision features each, float number i of a word in
// bits [32*i +: 32]. With LANES = PORT_WIDTH/32 floats per word:
//   D <= LANES: a word holds DIST_FACTOR = LANES/D whole points, computed by
//               DIST_FACTOR parallel dist_units (one result per lane per
//               cycle, DIST_II = 1);
//   D >  LANES: a point spans DIST_II = D/LANES words; one dist_unit sums
//               LANES features per cycle and the partial sums are
//               accumulated, giving one distance every DIST_II cycles.
// All D features of a point are thus handled in parallel up to the port
// width, and the tile takes WORDS cycles plus 2 cycles of pipeline latency
// (buffer read, then the registered result). out_idx is the tile-local index
// of the point in lane 0; lane f holds point out_idx+f. `done` pulses with
// the last result.
// The document chooses dist_factor and dist_II per design; here they follow
// from D and the port width, which reproduces the document's per-tile cycle
// counts. The document requires D to be a divisor or multiple of LANES.
module dist_calc
  import knn_pkg::*;
#(
  parameter int unsigned D          = 16,
  parameter int unsigned PORT_WIDTH = 512,
  parameter int unsigned WORDS      = 2048,
  localparam int unsigned LANES       = PORT_WIDTH / 32,
  localparam int unsigned DIST_FACTOR = (D <= LANES) ? LANES / D : 1,
  localparam int unsigned DIST_II     = (D <= LANES) ? 1 : D / LANES,
  localparam int unsigned M           = (D <= LANES) ? D : LANES,
  localparam int unsigned B           = WORDS * DIST_FACTOR / DIST_II,
  localparam int unsigned AW          = (WORDS <= 1) ? 1 : $clog2(WORDS),
  localparam int unsigned IW          = $clog2(B + 1)
) (
  input  logic                  clk,
  input  logic                  rst_n,
  input  logic                  start,
  input  metric_e               metric,
  input  float_t                query [D],
  output logic [AW-1:0]         buf_raddr,
  input  logic [PORT_WIDTH-1:0] buf_rdata,
  output logic                  out_valid,
  output logic [IW-1:0]         out_idx,
  output float_t                out_dist [DIST_FACTOR],
  output logic                  done
);

  localparam int unsigned SUBW = (DIST_II <= 1) ? 1 : $clog2(DIST_II);

  logic            run, rd_valid, rd_last;
  logic [AW-1:0]   cnt;
  logic [SUBW-1:0] sub, rd_sub;
  logic [IW-1:0]   pidx, rd_pidx;
  float_t          part [DIST_FACTOR];
  float_t          acc, acc_next;
  float_t [M-1:0]  qsel;

  assign buf_raddr = cnt;

  // Word counter: one buffer read per cycle.
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      run <= 1'b0; cnt <= '0; sub <= '0; pidx <= '0;
      rd_valid <= 1'b0; rd_last <= 1'b0; rd_sub <= '0; rd_pidx <= '0;
    end else begin
      rd_valid <= run;
      rd_last  <= run && (cnt == AW'(WORDS - 1));
      rd_sub   <= sub;
      rd_pidx  <= pidx;
      if (start) begin
        run <= 1'b1; cnt <= '0; sub <= '0; pidx <= '0;
      end else if (run) begin
        cnt <= cnt + 1'b1;
        if (cnt == AW'(WORDS - 1)) run <= 1'b0;
        if (DIST_II == 1 || sub == SUBW'(DIST_II - 1)) begin
          sub  <= '0;
          pidx <= pidx + IW'(DIST_FACTOR);
        end else begin
          sub <= sub + 1'b1;
        end
      end
    end
  end

  // Query features matching the word being read.
  always_comb begin
    for (int l = 0; l < M; l++)
      qsel[l] = query[(DIST_II == 1) ? l : int'(rd_sub) * LANES + l];
  end

  for (genvar f = 0; f < DIST_FACTOR; f++) begin : g_pt
    float_t [M-1:0] xsel;
    for (genvar l = 0; l < M; l++) begin : g_l
      assign xsel[l] = buf_rdata[32*(f*M + l) +: 32];
    end
    dist_unit #(.M(M)) u_dist (.metric, .x(xsel), .q(qsel), .distance(part[f]));
  end

  // Accumulation across the words of one point (only used when DIST_II > 1).
  fp32_add u_acc (.a(acc), .b(part[0]), .y(acc_next));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      acc <= '0; out_valid <= 1'b0; out_idx <= '0; done <= 1'b0;
      for (int f = 0; f < DIST_FACTOR; f++) out_dist[f] <= '0;
    end else begin
      out_valid <= 1'b0;
      done      <= 1'b0;
      if (rd_valid) begin
        if (DIST_II == 1) begin
          out_valid <= 1'b1;
          out_idx   <= rd_pidx;
          for (int f = 0; f < DIST_FACTOR; f++) out_dist[f] <= part[f];
        end else if (rd_sub == '0) begin
          acc <= part[0];
        end else if (rd_sub == SUBW'(DIST_II - 1)) begin
          out_valid   <= 1'b1;
          out_idx     <= rd_pidx;
          out_dist[0] <= acc_next;
        end else begin
          acc <= acc_next;
        end
        done <= rd_last;
      end
    end
  end

endmodule
