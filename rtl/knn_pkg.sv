// knn_pkg: types and widths shared by the kNN accelerator.
//
// A reference point is a pair of signed fixed-point coordinates (x, y),
// packed as one two-element vector so that a whole point moves in one
// memory beat. The squared Euclidean distance of two such points needs
// 2*COORD_W+2 bits to be exact. Indices address up to 2**IDX_W points.
// The number format is this design's choice: the original kernels work on
// floating-point coordinates.
package knn_pkg;

  localparam int unsigned COORD_W = 16;               // bits per coordinate
  localparam int unsigned DIST_W  = 2 * COORD_W + 2;  // exact squared distance
  localparam int unsigned IDX_W   = 19;               // index of a point, up to 524288
  localparam int unsigned ADDR_W  = 32;               // global memory word address
  localparam int unsigned LEN_W   = 8;                // burst length field (beats - 1)

  typedef logic signed [COORD_W-1:0] coord_t;
  typedef logic        [DIST_W-1:0]  dist_t;
  typedef logic        [IDX_W-1:0]   idx_t;

  typedef struct packed {
    coord_t y;
    coord_t x;
  } point_t;

  // One candidate neighbour: its distance to the query and its index in S.
  typedef struct packed {
    dist_t dsq;
    idx_t  idx;
  } cand_t;

endpackage
