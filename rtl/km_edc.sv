// km_edc: pipelined squared Euclidean distance calculator (EDC).
//
// Computes dist_out = (xa - xb)^2 + (ya - yb)^2 for a data point a and a centroid
// b, accepting a new pair every cycle. The three computing stages follow the
// source design: stage 1 subtracts (dx, dy), stage 2 squares the differences
// in DSP multipliers, stage 3 adds the squares into the output register. The
// square root is never taken: comparing squared distances picks the same
// nearest centroid.
//
// Ahead of stage 1 the operands, which arrive straight from the block RAM read
// ports, are registered once more. This register is this design's own choice:
// it gives the RAM output a full cycle of routing and maps onto the DSP input
// registers, and it makes the read-to-distance latency five cycles, the depth
// of the alignment delay line.
//
// Interface: a and b are {x, y} pairs of signed COORD_W-bit coordinates; dist_out
// is unsigned, DIST_W = 2*(COORD_W+1)+1 bits wide, so it never overflows.
// Timing: dist_out(t+4) is the distance of a(t), b(t). There is no reset and no
// stall; validity travels beside the pipeline in km_pipe_align.
module km_edc (
  input  logic            clk,
  input  km_pkg::point_t  a,
  input  km_pkg::point_t  b,
  output km_pkg::dist_t   dist_out
);
  import km_pkg::*;

  point_t a_q, b_q;          // operand register
  diff_t  dx, dy;            // stage 1
  (* use_dsp = "yes" *) sq_t dx2;   // stage 2
  (* use_dsp = "yes" *) sq_t dy2;

  always_ff @(posedge clk) begin
    a_q  <= a;
    b_q  <= b;
    // stage 1: subtractors (sign-extended so the difference never wraps)
    dx   <= diff_t'(a_q.x) - diff_t'(b_q.x);
    dy   <= diff_t'(a_q.y) - diff_t'(b_q.y);
    // stage 2: multipliers
    dx2  <= sq_t'(dx * dx);
    dy2  <= sq_t'(dy * dy);
    // stage 3: adder into the output register
    dist_out <= dist_t'(dx2) + dist_t'(dy2);
  end
endmodule
