// km_pkg: types and constants shared by the K-means assignment accelerator.
//
// A data point and a centroid are both 2-D points of two signed fixed-point
// coordinates. The squared Euclidean distance of two such points needs
// 2*(COORD_W+1)+1 bits: each difference grows by one bit, its square doubles
// that, and the sum of the two squares adds one more. The default sizes give
// 256 points of 32 bits, 4 centroids and 256 two-bit assignments, which is
// 1104 bytes (about 1.08 KiB) of on-chip memory, and 256 x 4 = 1024 distance
// evaluations per iteration.
//
// The coordinate width and its signedness are this design's own choice; the
// number of clusters (4), the number of iterations (5) and the 4-bit state and
// 8-bit iteration-count debug buses follow the source description.
package km_pkg;

  // Width of one coordinate (signed two's complement fixed point).
  localparam int unsigned COORD_W = 16;
  // Width of a coordinate difference.
  localparam int unsigned DIFF_W  = COORD_W + 1;
  // Width of one squared difference.
  localparam int unsigned SQ_W    = 2 * DIFF_W;
  // Width of the squared distance (sum of two squares).
  localparam int unsigned DIST_W  = SQ_W + 1;

  // Width of the FSM state debug bus and the iteration counter.
  localparam int unsigned STATE_W = 4;
  localparam int unsigned ITER_W  = 8;

  typedef logic signed [COORD_W-1:0] coord_t;
  typedef logic signed [DIFF_W-1:0]  diff_t;
  typedef logic        [SQ_W-1:0]    sq_t;
  typedef logic        [DIST_W-1:0]  dist_t;

  // One 2-D point; also the layout of one word of the point and centroid RAMs.
  typedef struct packed {
    coord_t x;
    coord_t y;
  } point_t;

  // Controller states.
  typedef enum logic [STATE_W-1:0] {
    S_IDLE   = 4'd0,  // wait for start
    S_ASSIGN = 4'd1,  // issue every (point, centroid) pair
    S_UPDATE = 4'd2,  // wait for the pipeline to flush
    S_CHECK  = 4'd3   // count the iteration, loop or finish
  } state_t;

endpackage
