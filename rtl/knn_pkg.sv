// knn_pkg: types and constants shared by the KNN accelerator.
//
// Feature values and distances are IEEE-754 single-precision numbers carried
// as raw 32-bit patterns. Distances are never negative, so two distances can
// be ordered by comparing their bit patterns as unsigned integers; the sorter
// relies on this. DIST_MAX (the largest finite float) marks an empty slot and
// ID_INVALID (all ones) marks a slot that holds no data point.
package knn_pkg;

  typedef logic [31:0] float_t;
  typedef logic [31:0] id_t;

  // Distance metric of Eq. (1); the square root of the Euclidean distance is
  // not taken.
  typedef enum logic {
    METRIC_MANHATTAN = 1'b0,
    METRIC_EUCLIDEAN = 1'b1
  } metric_e;

  // One candidate neighbour: its distance to the query and its point id.
  typedef struct packed {
    float_t distance;
    id_t    id;
  } knn_item_t;

  localparam float_t    DIST_MAX   = 32'h7F7F_FFFF;
  localparam id_t       ID_INVALID = 32'hFFFF_FFFF;
  localparam knn_item_t ITEM_EMPTY = '{distance: DIST_MAX, id: ID_INVALID};

endpackage
