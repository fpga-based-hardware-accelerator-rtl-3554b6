// tb_km_edc: self-checking testbench of the distance calculator (km_edc).
//
// Feeds a new random point pair every cycle, including the extreme
// coordinates where a difference needs the extra sign bit, and compares each
// output with (xa-xb)^2 + (ya-yb)^2 worked out in 64-bit integers, exactly
// LAT = 4 cycles after the pair was applied (full throughput, no bubbles).
module tb_km_edc;
  import km_pkg::*;

  localparam int LAT = 4;
  localparam int N   = 2000;

  logic clk = 1'b0;
  always #5 clk = ~clk;

  point_t a, b;
  dist_t  dist_out;

  km_edc dut (.*);

  int checks = 0, failures = 0;
  longint expect_q [$];

  function automatic longint ref_dist(point_t p, point_t q);
    longint dx, dy;
    dx = longint'(p.x) - longint'(q.x);
    dy = longint'(p.y) - longint'(q.y);
    return dx * dx + dy * dy;
  endfunction

  function automatic coord_t rnd_coord(int i);
    case ($urandom_range(5))
      0: return coord_t'(16'sh7FFF);
      1: return coord_t'(16'sh8000);
      default: return coord_t'($urandom());
    endcase
  endfunction

  initial begin
    repeat (N + 100) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    a = '0; b = '0;
    for (int i = 0; i < N + LAT; i++) begin
      @(negedge clk);
      if (i >= LAT) begin
        longint e;
        e = expect_q.pop_front();
        checks++;
        if (longint'(dist_out) != e) begin
          failures++;
          $display("FAIL: pair %0d dist %0d expected %0d", i - LAT, dist_out, e);
        end
      end
      if (i < N) begin
        a.x = rnd_coord(i); a.y = rnd_coord(i);
        b.x = rnd_coord(i); b.y = rnd_coord(i);
        expect_q.push_back(ref_dist(a, b));
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
