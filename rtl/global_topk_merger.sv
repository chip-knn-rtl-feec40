// global_topk_merger: merges the local top-K lists of P PEs into the global
// K nearest neighbours.
//
// Each PE delivers its K results as a valid/ready stream (the on-chip
// kernel-to-kernel streams of the document). The merger serves the PEs in
// order 0..P-1, taking K items from each, feeds them to a topk_sorter one per
// three cycles, and then feeds K dummy items so that the kept list is sorted.
// It runs once per query after the PEs finish, costing O(P*K) cycles.
// `start` clears the sorter and arms the merger; `done` pulses for one cycle
// when `nn` holds the result, nearest first, and `nn` then holds until the
// next start. A stream may present its first item before its turn; it is
// simply held off by ready. The document gives the merger's function and
// cost; the in-order service and reuse of the sorter are this design's own.
module global_topk_merger
  import knn_pkg::*;
#(
  parameter int unsigned K = 10,
  parameter int unsigned P = 28     // number of PEs
) (
  input  logic      clk,
  input  logic      rst_n,
  input  logic      start,
  input  logic      s_valid [P],
  output logic      s_ready [P],
  input  knn_item_t s_item  [P],
  output knn_item_t nn      [K],
  output logic      done
);

  localparam int unsigned SW = $clog2(P + 2);
  localparam int unsigned KW = $clog2(K + 1);

  logic          active;
  logic [SW-1:0] src;       // PE being served; P means the dummy tail
  logic [KW-1:0] pos;
  logic          in_valid, in_ready, sorter_busy;
  knn_item_t     in_item;

  always_comb begin
    in_valid = 1'b0;
    in_item  = ITEM_EMPTY;
    for (int p = 0; p < P; p++) s_ready[p] = 1'b0;
    if (active) begin
      if (src == SW'(P)) begin
        in_valid = 1'b1;
      end else begin
        for (int p = 0; p < P; p++)
          if (src == SW'(p)) begin
            in_valid   = s_valid[p];
            in_item    = s_item[p];
            s_ready[p] = in_ready;
          end
      end
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      active <= 1'b0;
      src    <= '0;
      pos    <= '0;
      done   <= 1'b0;
    end else begin
      done <= 1'b0;
      if (start) begin
        active <= 1'b1;
        src    <= '0;
        pos    <= '0;
      end else if (active && in_valid && in_ready) begin
        if (pos == KW'(K - 1)) begin
          pos <= '0;
          if (src == SW'(P)) active <= 1'b0;
          src <= src + 1'b1;
        end else begin
          pos <= pos + 1'b1;
        end
      end
      if (!active && src == SW'(P + 1) && !sorter_busy && !start) begin
        done <= 1'b1;
        src  <= '0;
      end
    end
  end

  topk_sorter #(.K(K)) u_sorter (
    .clk, .rst_n, .clear(start), .in_valid, .in_ready, .in_item,
    .best(nn), .busy(sorter_busy)
  );

endmodule
