// tb_kmeans_top: end-to-end testbench of the accelerator (kmeans_top) at its
// default sizes: 256 points, K = 4 centroids, 5 iterations.
//
// Loads 256 points (random, extreme and deliberately equidistant ones) and
// four centroids, starts a run and checks:
//   - every result on the selector output (index and squared distance)
//     against a 64-bit reference computed here, in point order;
//   - the rates: 9 cycles from a point's first issued pair to its result,
//     one result every 4 cycles, 1029 cycles per iteration, done exactly
//     5146 cycles after the first issue cycle;
//   - the assignment RAM contents read back after the run.
// Then it reloads the centroids and runs again, so the results must change.
// It counts each mechanism of the design and fails if one never happened:
// a later centroid replacing the running minimum, a tie kept by the lower
// index, the UPDATE flush, the iteration loop, the wait of done for results
// still in flight, and a second run after a reload.
module tb_kmeans_top;
  import km_pkg::*;

  localparam int unsigned N_POINTS = 256;
  localparam int unsigned K        = 4;
  localparam int unsigned ITERS    = 5;
  localparam int unsigned PID_W    = 8;
  localparam int unsigned CID_W    = 2;
  localparam int unsigned PERIOD   = 1029;   // cycles per iteration
  localparam int unsigned LATENCY  = 9;      // first pair of a point to its result

  logic clk = 1'b0;
  always #5 clk = ~clk;

  logic               rst, start, busy, done;
  logic               pt_we, cen_we;
  logic [PID_W-1:0]   pt_waddr, asg_raddr;
  logic [CID_W-1:0]   cen_waddr, asg_rdata;
  point_t             pt_wdata, cen_wdata;
  state_t             dbg_state;
  logic [ITER_W-1:0]  dbg_iter_count;
  logic [PID_W-1:0]   dbg_point_idx;
  logic [4:0]         dbg_valid_pipe;
  dist_t              dbg_edc_dist, dbg_min_dist;
  logic [CID_W-1:0]   dbg_best_idx;
  logic               dbg_best_valid;

  kmeans_top dut (.*);

  int checks = 0, failures = 0;
  int n_replaced = 0, n_ties = 0, n_flush = 0, n_iter = 0, n_wait_done = 0, n_runs = 0;

  point_t            pts  [N_POINTS];
  point_t            cens [K];
  logic [CID_W-1:0]  e_idx  [N_POINTS];
  longint            e_dist [N_POINTS];

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL: %s", what);
    end
  endtask

  initial begin
    repeat (4 * PERIOD * ITERS) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic longint sqd(point_t p, point_t q);
    longint dx, dy;
    dx = longint'(p.x) - longint'(q.x);
    dy = longint'(p.y) - longint'(q.y);
    return dx * dx + dy * dy;
  endfunction

  // nearest centroid, lowest index on a tie
  task automatic reference();
    for (int i = 0; i < N_POINTS; i++) begin
      longint best;
      int bi;
      best = sqd(pts[i], cens[0]); bi = 0;
      for (int k = 1; k < K; k++)
        if (sqd(pts[i], cens[k]) < best) begin best = sqd(pts[i], cens[k]); bi = k; end
      e_idx[i]  = CID_W'(bi);
      e_dist[i] = best;
    end
  endtask

  function automatic bit has_tie(int i);
    for (int k = 0; k < K; k++)
      if (k > int'(e_idx[i]) && sqd(pts[i], cens[k]) == e_dist[i]) return 1'b1;
    return 1'b0;
  endfunction

  task automatic load_centroids(input int set);
    for (int k = 0; k < K; k++) begin
      if (set == 0) begin
        cens[k].x = coord_t'((k % 2) ? 1000 : -1000);
        cens[k].y = coord_t'((k / 2) ? 1000 : -1000);
      end else begin
        cens[k].x = coord_t'($urandom());
        cens[k].y = coord_t'($urandom());
      end
      @(negedge clk);
      cen_we = 1'b1; cen_waddr = CID_W'(k); cen_wdata = cens[k];
    end
    @(negedge clk) cen_we = 1'b0;
  endtask

  task automatic run_and_check();
    int t, t_assign [ITERS], n_res, it_seen, pt_seen;
    int last_res;
    state_t prev_state;
    reference();
    for (int i = 0; i < N_POINTS; i++) begin
      if (e_idx[i] != 0) n_replaced++;
      if (has_tie(i)) n_ties++;
    end
    @(negedge clk) start = 1'b1;
    @(negedge clk) start = 1'b0;
    prev_state = S_IDLE;
    t = 0; n_res = 0; it_seen = 0; pt_seen = 0; last_res = -1;
    while (!done && t < 2 * PERIOD * ITERS) begin
      if (dbg_state == S_ASSIGN && prev_state != S_ASSIGN) begin
        if (it_seen < ITERS) t_assign[it_seen] = t;
        if (it_seen > 0)
          check(t - t_assign[it_seen-1] == PERIOD,
                $sformatf("iteration %0d took %0d cycles", it_seen - 1, t - t_assign[it_seen-1]));
        it_seen++;
      end
      if (dbg_state == S_UPDATE) n_flush++;
      if (dbg_state == S_CHECK)  n_iter++;
      if (dbg_state == S_IDLE && busy) n_wait_done++;
      if (dbg_best_valid) begin
        int p;
        p = n_res % N_POINTS;
        check(dbg_best_idx == e_idx[p],
              $sformatf("point %0d: index %0d expected %0d", p, dbg_best_idx, e_idx[p]));
        check(longint'(dbg_min_dist) == e_dist[p],
              $sformatf("point %0d: distance %0d expected %0d", p, dbg_min_dist, e_dist[p]));
        if (n_res == 0)
          check(t - t_assign[0] == LATENCY, $sformatf("first result after %0d cycles", t - t_assign[0]));
        else if (p != 0)
          check(t - last_res == K, $sformatf("results %0d cycles apart", t - last_res));
        else
          check(t - t_assign[n_res / N_POINTS] == LATENCY, "first result of an iteration late");
        last_res = t;
        n_res++;
      end
      prev_state = dbg_state;
      @(negedge clk);
      t++;
    end
    check(done, "run did not finish");
    check(it_seen == ITERS, $sformatf("%0d iterations started", it_seen));
    check(n_res == N_POINTS * ITERS, $sformatf("%0d results", n_res));
    check(t - t_assign[0] == PERIOD * ITERS + 1,
          $sformatf("done %0d cycles after the first issue", t - t_assign[0]));
    check(dbg_iter_count == ITER_W'(ITERS), "iteration count after the run");
    // read the assignment RAM back
    for (int i = 0; i < N_POINTS; i++) begin
      asg_raddr = PID_W'(i);
      @(negedge clk);
      check(asg_rdata == e_idx[i], $sformatf("assignment %0d: %0d expected %0d", i, asg_rdata, e_idx[i]));
    end
    n_runs++;
  endtask

  initial begin
    rst = 1'b1; start = 1'b0; pt_we = 1'b0; cen_we = 1'b0;
    pt_waddr = '0; cen_waddr = '0; pt_wdata = '0; cen_wdata = '0; asg_raddr = '0;
    repeat (3) @(posedge clk);
    @(negedge clk) rst = 1'b0;
    check(!busy && !done, "busy or done after reset");
    // points: random, on the axes (ties between centroids), at the extremes
    for (int i = 0; i < N_POINTS; i++) begin
      case (i % 8)
        0: pts[i] = '{x: coord_t'(0), y: coord_t'($urandom())};
        1: pts[i] = '{x: coord_t'($urandom()), y: coord_t'(0)};
        2: pts[i] = '{x: coord_t'(0), y: coord_t'(0)};
        3: pts[i] = '{x: coord_t'(16'sh7FFF), y: coord_t'(16'sh8000)};
        default: pts[i] = point_t'($urandom());
      endcase
      @(negedge clk);
      pt_we = 1'b1; pt_waddr = PID_W'(i); pt_wdata = pts[i];
    end
    @(negedge clk) pt_we = 1'b0;
    load_centroids(0);
    run_and_check();
    load_centroids(1);
    run_and_check();
    $display("replaced=%0d ties=%0d flush_cycles=%0d iterations=%0d wait_done=%0d runs=%0d",
             n_replaced, n_ties, n_flush, n_iter, n_wait_done, n_runs);
    check(n_replaced > 0, "no point had a nearer centroid after centroid 0");
    check(n_ties > 0, "no tie between centroids");
    check(n_flush == 2 * ITERS * 4, "UPDATE flush cycles");
    check(n_iter == 2 * ITERS, "CHECK visits");
    check(n_wait_done > 0, "done never waited for results in flight");
    check(n_runs == 2, "second run");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
