// local_topk_merger: merges the SF partial top-K lists of one PE (one list
// per sort partition) into a single sorted top-K list.
//
// After `start` it clears an internal topk_sorter and feeds it the SF*K
// candidates, list by list, followed by K dummy items of distance DIST_MAX so
// that the kept list ends up sorted. That is SF*K + K items at one per three
// cycles, i.e. O(sort_factor * K) as the document states. `done` pulses for
// one cycle when `best` is final; `best` then holds until the next start.
// The document names the merger and its cost but not its insides; reusing
// the top-K sorter is this design's own choice.
module local_topk_merger
  import knn_pkg::*;
#(
  parameter int unsigned K  = 10,
  parameter int unsigned SF = 3     // number of lists (sort_factor)
) (
  input  logic      clk,
  input  logic      rst_n,
  input  logic      start,
  input  knn_item_t lists [SF][K],
  output knn_item_t best  [K],
  output logic      done
);

  localparam int unsigned SW = $clog2(SF + 2);
  localparam int unsigned KW = $clog2(K + 1);

  logic          active;
  logic [SW-1:0] src;       // list being fed; SF means the dummy tail
  logic [KW-1:0] pos;       // entry within the list
  logic          in_valid, in_ready, sorter_busy;
  knn_item_t     in_item;

  assign in_valid = active;
  always_comb begin
    in_item = ITEM_EMPTY;
    for (int s = 0; s < SF; s++)
      if (src == SW'(s)) in_item = lists[s][pos];
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
      end else if (active && in_ready) begin
        if (pos == KW'(K - 1)) begin
          pos <= '0;
          if (src == SW'(SF)) active <= 1'b0;
          src <= src + 1'b1;
        end else begin
          pos <= pos + 1'b1;
        end
      end
      // The last item leaves the sorter three cycles after acceptance.
      if (!active && src == SW'(SF + 1) && !sorter_busy && !start) begin
        done <= 1'b1;
        src  <= '0;
      end
    end
  end

  topk_sorter #(.K(K)) u_sorter (
    .clk, .rst_n, .clear(start), .in_valid, .in_ready, .in_item,
    .best, .busy(sorter_busy)
  );

endmodule
