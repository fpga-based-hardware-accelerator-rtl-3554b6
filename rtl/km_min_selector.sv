// km_min_selector: nearest-centroid selector.
//
// Receives the K distances of one data point on consecutive valid cycles,
// tagged with their centroid index idx, the first one marked by start_point.
// A comparator checks each distance against the running minimum register
// (min_reg, with its index); the first distance of a point loads the register
// unconditionally. When the distance of the last centroid (idx = K-1) has
// been compared, the winner is copied into the output register (dist,
// best_idx) and best_valid pulses for one cycle. This two-register structure
// follows the source design; the strict "less than" comparison, which keeps
// the lowest index on a tie, and the use of idx = K-1 to end a point are this
// design's own choices.
//
// Timing: best_valid, best_idx and min_dist are valid in the cycle after the
// last distance of a point is presented. Reset (synchronous, active high)
// clears best_valid. start_point without valid is ignored.
module km_min_selector #(
  parameter int unsigned K     = 4,
  parameter int unsigned IDX_W = (K > 1) ? $clog2(K) : 1
) (
  input  logic               clk,
  input  logic               rst,
  input  logic               valid,
  input  logic               start_point,
  input  km_pkg::dist_t      dist_in,
  input  logic [IDX_W-1:0]   idx,
  output km_pkg::dist_t      min_dist,
  output logic [IDX_W-1:0]   best_idx,
  output logic               best_valid
);
  import km_pkg::*;

  dist_t            min_reg;
  logic [IDX_W-1:0] min_idx;

  // Comparator: take the new distance if it starts a point or beats the
  // running minimum.
  logic             take;
  dist_t            win_dist;
  logic [IDX_W-1:0] win_idx;

  always_comb begin
    take     = start_point || (dist_in < min_reg);
    win_dist = take ? dist_in : min_reg;
    win_idx  = take ? idx  : min_idx;
  end

  always_ff @(posedge clk) begin
    if (valid) begin
      min_reg <= win_dist;
      min_idx <= win_idx;
    end
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      best_valid <= 1'b0;
      min_dist   <= '0;
      best_idx   <= '0;
    end else begin
      best_valid <= valid && (idx == IDX_W'(K - 1));
      if (valid && (idx == IDX_W'(K - 1))) begin
        min_dist <= win_dist;
        best_idx <= win_idx;
      end
    end
  end
endmodule
