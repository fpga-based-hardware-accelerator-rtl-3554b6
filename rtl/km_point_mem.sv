// km_point_mem: on-chip RAM holding the data points.
//
// One word per point, a packed {x, y} pair of signed coordinates. The read
// port is synchronous: the address presented in one cycle gives its word on
// rdata in the next ("1-cycle access", as a block RAM does). A separate write
// port loads the points before a run; the source preloads its RAMs and does
// not describe a loading port, so the write port is this design's own choice.
// A write and a read of the same address in one cycle return the old word.
//
// Timing: rdata(t+1) = mem[raddr(t)]; mem[waddr] <= wdata at the edge where
// we is high. The memory itself is not reset.
module km_point_mem #(
  parameter int unsigned DEPTH  = 256,
  parameter int unsigned ADDR_W = $clog2(DEPTH)
) (
  input  logic                clk,
  input  logic                we,
  input  logic [ADDR_W-1:0]   waddr,
  input  km_pkg::point_t      wdata,
  input  logic [ADDR_W-1:0]   raddr,
  output km_pkg::point_t      rdata
);
  km_pkg::point_t mem [DEPTH];

  always_ff @(posedge clk) begin
    if (we) mem[waddr] <= wdata;
    rdata <= mem[raddr];
  end
endmodule
