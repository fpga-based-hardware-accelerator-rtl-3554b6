// km_assign_mem: on-chip RAM holding the cluster assignment of every point.
//
// One word per point: the index (0..K-1) of the centroid nearest to it, as
// found in the latest iteration. The write port is driven by the end of the
// distance/minimum pipeline; the synchronous read port lets the host (or a
// later centroid-update stage) read the result after a run. The source names
// an assignment memory; its ports are this design's own choice.
//
// Timing: rdata(t+1) = mem[raddr(t)]; mem[waddr] <= wdata at the edge where
// we is high. Read-during-write of one address returns the old word. The
// memory itself is not reset.
module km_assign_mem #(
  parameter int unsigned DEPTH  = 256,
  parameter int unsigned K      = 4,
  parameter int unsigned ADDR_W = $clog2(DEPTH),
  parameter int unsigned IDX_W  = (K > 1) ? $clog2(K) : 1
) (
  input  logic               clk,
  input  logic               we,
  input  logic [ADDR_W-1:0]  waddr,
  input  logic [IDX_W-1:0]   wdata,
  input  logic [ADDR_W-1:0]  raddr,
  output logic [IDX_W-1:0]   rdata
);
  logic [IDX_W-1:0] mem [DEPTH];

  always_ff @(posedge clk) begin
    if (we) mem[waddr] <= wdata;
    rdata <= mem[raddr];
  end
endmodule
