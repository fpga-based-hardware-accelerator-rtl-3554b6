// tb_km_fsm: self-checking testbench of the controller (km_fsm) at its
// default sizes (256 points, K = 4, 5 iterations, 4 flush cycles).
//
// After a start pulse the controller is compared cycle by cycle with an
// independently built expected schedule: per iteration 1024 ASSIGN cycles
// issuing (pid, cid) in point-major order, 4 UPDATE cycles and one CHECK
// cycle, i.e. 1029 cycles per iteration and 5145 for the run, after which it
// must sit in IDLE with done set and 5 completed iterations. A start pulse in
// the middle of the run must be ignored; a second run must clear done; a
// reset in the middle of a run must return it to IDLE.
module tb_km_fsm;
  import km_pkg::*;

  localparam int unsigned N_POINTS = 256;
  localparam int unsigned K        = 4;
  localparam int unsigned ITERS    = 5;
  localparam int unsigned FLUSH    = 4;
  localparam int unsigned PID_W    = 8;
  localparam int unsigned CID_W    = 2;
  localparam int unsigned PERIOD   = N_POINTS * K + FLUSH + 1;

  logic clk = 1'b0;
  always #5 clk = ~clk;

  logic               rst, start, issue_valid, done, busy;
  state_t             state;
  logic [PID_W-1:0]   pid;
  logic [CID_W-1:0]   cid;
  logic [ITER_W-1:0]  iter;

  km_fsm dut (.*);

  int checks = 0, failures = 0;
  int errs_this_run;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      errs_this_run++;
      if (errs_this_run < 10) $display("FAIL: %s", what);
    end
  endtask

  initial begin
    repeat (4 * PERIOD * ITERS) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // one run, checked against the expected schedule; start is pulsed in the
  // cycle before the schedule's first entry
  task automatic run_and_check(input bit poke_start);
    int cyc = 0;
    errs_this_run = 0;
    @(negedge clk) start = 1'b1;
    @(negedge clk) start = 1'b0;
    for (int it = 0; it < ITERS; it++) begin
      for (int p = 0; p < N_POINTS; p++)
        for (int c = 0; c < K; c++) begin
          if (poke_start && it == 1 && p == 3) start = 1'b1;
          else start = 1'b0;
          check(state == S_ASSIGN && issue_valid && busy && !done,
                $sformatf("cycle %0d: not issuing (state %0d)", cyc, state));
          check(pid == PID_W'(p) && cid == CID_W'(c),
                $sformatf("cycle %0d: pair (%0d,%0d) expected (%0d,%0d)", cyc, pid, cid, p, c));
          check(iter == ITER_W'(it), $sformatf("cycle %0d: iter %0d expected %0d", cyc, iter, it));
          cyc++;
          @(negedge clk);
        end
      start = 1'b0;
      for (int f = 0; f < FLUSH; f++) begin
        check(state == S_UPDATE && !issue_valid, $sformatf("cycle %0d: expected UPDATE, state %0d", cyc, state));
        cyc++;
        @(negedge clk);
      end
      check(state == S_CHECK && !issue_valid && iter == ITER_W'(it),
            $sformatf("cycle %0d: expected CHECK, state %0d", cyc, state));
      cyc++;
      @(negedge clk);
    end
    check(cyc == PERIOD * ITERS, "run length");
    check(state == S_IDLE && done && !busy && !issue_valid, "not idle and done after the run");
    check(iter == ITER_W'(ITERS), $sformatf("iter %0d after the run", iter));
    repeat (3) @(negedge clk);
    check(state == S_IDLE && done, "did not stay idle with done");
  endtask

  initial begin
    rst = 1'b1; start = 1'b0;
    repeat (3) @(posedge clk);
    @(negedge clk) rst = 1'b0;
    check(state == S_IDLE && !done && !busy && !issue_valid, "not idle after reset");
    run_and_check(1'b1);
    run_and_check(1'b0);
    // reset in the middle of a run
    @(negedge clk) start = 1'b1;
    @(negedge clk) start = 1'b0;
    repeat (100) @(negedge clk);
    check(state == S_ASSIGN, "third run did not start");
    rst = 1'b1;
    @(negedge clk) rst = 1'b0;
    check(state == S_IDLE && !done && iter == '0 && !issue_valid, "reset did not return to IDLE");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
