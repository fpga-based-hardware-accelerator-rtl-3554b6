// km_fsm: controller of the K-means assignment pass.
//
// Four states, as in the source design:
//   IDLE   wait for start;
//   ASSIGN issue one (point index pid, centroid index cid) pair per cycle,
//          scanning all K centroids of a point before moving to the next
//          point, N_POINTS*K cycles in all;
//   UPDATE wait FLUSH cycles for the pipeline to drain, so that the last
//          distance has reached the minimum selector;
//   CHECK  count the iteration; run ASSIGN again until ITERS iterations are
//          done, then return to IDLE with done set.
// One iteration therefore takes N_POINTS*K + FLUSH + 1 cycles: 1029 cycles,
// 10.29 us at 100 MHz, with the defaults. The iteration count is fixed (no
// convergence test) and the centroids are not changed between iterations,
// as in the source design. The FLUSH length, the state encoding and the
// meaning of iter (iterations completed) are this design's own choices.
//
// Interface: start is sampled in IDLE (a start while running is ignored).
// pid, cid, issue_valid are registered and drive the RAM read addresses.
// done stays high from the end of the last iteration until the next start.
// state and iter are the debug buses (4 and 8 bits). Reset is synchronous,
// active high.
module km_fsm #(
  parameter int unsigned N_POINTS = 256,
  parameter int unsigned K        = 4,
  parameter int unsigned ITERS    = 5,
  parameter int unsigned FLUSH    = 4,
  parameter int unsigned PID_W    = (N_POINTS > 1) ? $clog2(N_POINTS) : 1,
  parameter int unsigned CID_W    = (K > 1) ? $clog2(K) : 1
) (
  input  logic                        clk,
  input  logic                        rst,
  input  logic                        start,
  output km_pkg::state_t              state,
  output logic [PID_W-1:0]            pid,
  output logic [CID_W-1:0]            cid,
  output logic                        issue_valid,
  output logic [km_pkg::ITER_W-1:0]   iter,
  output logic                        done,
  output logic                        busy
);
  import km_pkg::*;

  localparam int unsigned FL_W = (FLUSH > 1) ? $clog2(FLUSH) : 1;
  logic [FL_W-1:0] flush_cnt;

  wire last_cid   = (cid == CID_W'(K - 1));
  wire last_point = (pid == PID_W'(N_POINTS - 1));

  always_ff @(posedge clk) begin
    if (rst) begin
      state     <= S_IDLE;
      pid       <= '0;
      cid       <= '0;
      iter      <= '0;
      done      <= 1'b0;
      flush_cnt <= '0;
    end else begin
      unique case (state)
        S_IDLE: begin
          if (start) begin
            state <= S_ASSIGN;
            pid   <= '0;
            cid   <= '0;
            iter  <= '0;
            done  <= 1'b0;
          end
        end
        S_ASSIGN: begin
          if (last_cid) begin
            cid <= '0;
            if (last_point) begin
              pid       <= '0;
              flush_cnt <= '0;
              state     <= S_UPDATE;
            end else begin
              pid <= pid + 1'b1;
            end
          end else begin
            cid <= cid + 1'b1;
          end
        end
        S_UPDATE: begin
          if (flush_cnt == FL_W'(FLUSH - 1)) state <= S_CHECK;
          else                                flush_cnt <= flush_cnt + 1'b1;
        end
        S_CHECK: begin
          iter <= iter + 1'b1;
          if (iter == ITER_W'(ITERS - 1)) begin
            state <= S_IDLE;
            done  <= 1'b1;
          end else begin
            state <= S_ASSIGN;
          end
        end
        default: state <= S_IDLE;
      endcase
    end
  end

  assign issue_valid = (state == S_ASSIGN);
  assign busy        = (state != S_IDLE);

  initial begin
    assert (FLUSH >= 1) else $error("km_fsm: FLUSH must be at least 1");
    assert (ITERS >= 1 && ITERS < 2**ITER_W) else $error("km_fsm: ITERS out of range");
  end
endmodule
