// tb_km_min_selector: self-checking testbench of the nearest-centroid
// selector (km_min_selector).
//
// Presents groups of K = 4 distances (idx 0..3, start_point on idx 0), some
// back to back and some with idle cycles inside and between groups, with
// many equal distances so that ties occur. Checks that best_valid pulses
// exactly once per group, one cycle after its last distance, with the
// smallest distance and the lowest index among equal minima, and never
// otherwise.
module tb_km_min_selector;
  import km_pkg::*;

  localparam int unsigned K     = 4;
  localparam int unsigned IDX_W = 2;
  localparam int          GROUPS = 2000;

  logic clk = 1'b0;
  always #5 clk = ~clk;

  logic              rst, valid, start_point, best_valid;
  dist_t             dist_in, min_dist;
  logic [IDX_W-1:0]  idx, best_idx;

  km_min_selector dut (.*);

  int checks = 0, failures = 0;
  int ties = 0, replaced = 0;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  initial begin
    repeat (GROUPS * 12 + 100) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end


  initial begin
    rst = 1'b1; valid = 1'b0; start_point = 1'b0; dist_in = '0; idx = '0;
    repeat (2) @(posedge clk);
    @(negedge clk) rst = 1'b0;
    for (int g = 0; g < GROUPS; g++) begin
      dist_t d [K];
      dist_t m;
      int    mi;
      bit    near_tie;
      near_tie = ($urandom_range(2) == 0);
      for (int k = 0; k < K; k++)
        d[k] = near_tie ? dist_t'($urandom_range(3)) : {3'b0, 32'($urandom())};
      m = d[0]; mi = 0;
      for (int k = 1; k < K; k++) begin
        if (d[k] < m) begin m = d[k]; mi = k; end
      end
      for (int k = 1; k < K; k++) if (d[k] == m && mi < k) begin ties++; break; end
      if (mi != 0) replaced++;
      for (int k = 0; k < K; k++) begin
        // optional idle cycle with junk on the inputs
        if ($urandom_range(3) == 0) begin
          valid = 1'b0; start_point = 1'($urandom()); idx = IDX_W'(K - 1);
          dist_in = '0;
          @(posedge clk); #1;
          check(!best_valid, "best_valid on an idle cycle");
          @(negedge clk);
        end
        valid = 1'b1; start_point = (k == 0); idx = IDX_W'(k); dist_in = d[k];
        @(posedge clk); #1;
        if (k == K - 1) begin
          check(best_valid, $sformatf("group %0d: no result", g));
          check(best_idx == IDX_W'(mi), $sformatf("group %0d: best_idx %0d expected %0d", g, best_idx, mi));
          check(min_dist == m, $sformatf("group %0d: min_dist %0d expected %0d", g, min_dist, m));
        end else begin
          check(!best_valid, $sformatf("group %0d: best_valid after idx %0d", g, k));
        end
        @(negedge clk);
      end
      valid = 1'b0; start_point = 1'b0;
    end
    @(posedge clk); #1;
    check(!best_valid, "best_valid without a group");
    check(ties > 0 && replaced > 0, "stimulus made no ties or no replacement");
    $display("ties=%0d replaced=%0d", ties, replaced);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
