// km_centroid_mem: on-chip RAM holding the K cluster centroids.
//
// One word per centroid, a packed {x, y} pair of signed coordinates. The read
// port is synchronous with one cycle of latency, the same as the point RAM, so
// that a point and a centroid addressed in the same cycle arrive together at
// the distance unit. The write port loads the centroids before a run (a
// loading port is this design's own choice; the centroids stay fixed during
// the iterations, as in the source design).
//
// Timing: rdata(t+1) = mem[raddr(t)]; mem[waddr] <= wdata at the edge where
// we is high. The memory itself is not reset.
module km_centroid_mem #(
  parameter int unsigned K      = 4,
  parameter int unsigned ADDR_W = (K > 1) ? $clog2(K) : 1
) (
  input  logic                clk,
  input  logic                we,
  input  logic [ADDR_W-1:0]   waddr,
  input  km_pkg::point_t      wdata,
  input  logic [ADDR_W-1:0]   raddr,
  output km_pkg::point_t      rdata
);
  km_pkg::point_t mem [K];

  always_ff @(posedge clk) begin
    if (we) mem[waddr] <= wdata;
    rdata <= mem[raddr];
  end
endmodule
