// topk_sorter: keeps the K smallest distances seen so far, with their ids,
// using the two-phase compare-and-swap register array of CHIP-KNN.
//
// The array has K+1 slots. Slots 1..K hold the current best K candidates;
// slot 0 receives each incoming item. Every item takes three cycles, so the
// sorter accepts one item every third cycle (initiation interval 3, as in
// the document):
//   cycle 1  the item is written to slot 0;
//   cycle 2  "ahead" phase: every odd slot j is compared with slot j+1 and
//            the larger distance moves to the lower index;
//   cycle 3  "behind" phase: every odd slot j is compared with slot j-1 and
//            the larger distance again moves to the lower index.
// The largest of the K+1 values thus drifts toward slot 0, where it is
// overwritten by the next item. After K further dummy items of distance
// DIST_MAX the slots 1..K are sorted, largest in slot 1. The caller feeds
// those dummies; `clear` fills every slot with DIST_MAX / ID_INVALID.
// `best[i]` is slot K-i, so best[0] is the nearest neighbour once sorted.
// Distances are compared as unsigned bit patterns, which orders
// non-negative floats correctly; ties never swap.
// Follows the document: the slot array, the split into two fully parallel
// compare-and-swap loops and II=3. This design's own choice: for odd K the
// pairs are taken only inside slots 0..K (the document's loop bounds would
// reach slot K+1).
module topk_sorter
  import knn_pkg::*;
#(
  parameter int unsigned K = 10
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          clear,      // refill all slots with empty items
  input  logic          in_valid,
  output logic          in_ready,
  input  knn_item_t     in_item,
  output knn_item_t     best [K],   // ascending distance once sorted
  output logic          busy        // an accepted item is still moving
);

  typedef enum logic [1:0] {S_IDLE, S_AHEAD, S_BEHIND} phase_e;

  phase_e    phase;
  knn_item_t slot [K+1];

  assign in_ready = (phase == S_IDLE) && !clear;
  assign busy     = (phase != S_IDLE);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      phase <= S_IDLE;
      for (int i = 0; i <= K; i++) slot[i] <= ITEM_EMPTY;
    end else if (clear) begin
      phase <= S_IDLE;
      for (int i = 0; i <= K; i++) slot[i] <= ITEM_EMPTY;
    end else begin
      unique case (phase)
        S_IDLE: if (in_valid) begin
          slot[0] <= in_item;
          phase   <= S_AHEAD;
        end
        S_AHEAD: begin
          for (int j = 1; j + 1 <= K; j += 2)
            if (slot[j].distance < slot[j+1].distance) begin
              slot[j]   <= slot[j+1];
              slot[j+1] <= slot[j];
            end
          phase <= S_BEHIND;
        end
        S_BEHIND: begin
          for (int j = 1; j <= K; j += 2)
            if (slot[j].distance > slot[j-1].distance) begin
              slot[j]   <= slot[j-1];
              slot[j-1] <= slot[j];
            end
          phase <= S_IDLE;
        end
        default: phase <= S_IDLE;
      endcase
    end
  end

  for (genvar i = 0; i < K; i++) begin : g_best
    assign best[i] = slot[K-i];
  end

endmodule
