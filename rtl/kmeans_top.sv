// kmeans_top: K-means cluster-assignment accelerator.
//
// The data points and the K centroids sit in on-chip RAMs. The controller
// (km_fsm) walks every (point, centroid) pair, one per clock; the pair's RAM
// words feed the pipelined distance calculator (km_edc); the alignment
// registers (km_pipe_align) carry the pair's indices and valid bit beside the
// distance; the minimum selector (km_min_selector) keeps the smallest of a
// point's K distances and, after the last one, the index of the nearest
// centroid is written into the assignment RAM (km_assign_mem). The whole
// scan is repeated for a fixed ITERS iterations.
//
// Rates with the defaults (256 points, K = 4, 5 iterations):
//   - one distance per cycle, one point per K = 4 cycles;
//   - 9 cycles from issuing a point's first pair to its result in best_idx:
//     1 RAM read + 4 distance pipeline + K-1 further pairs + 1 selector;
//   - 1029 cycles per iteration (1024 pairs + 4 flush + 1 check) and 5145
//     cycles for the 5 iterations; done rises in the first cycle in which
//     the final assignment is in the RAM, 5146 cycles after the first pair.
// The structure, the block list and the rates follow the source design. The
// loading ports, the read port of the assignment RAM and the done/busy
// handshake are this design's own; the source preloads its RAMs.
//
// Ports:
//   start      pulse (sampled while idle) starting a run of ITERS iterations
//   busy/done  busy while running or while results are still in flight;
//              done high from the end of a run until the next start
//   pt_*       write port of the point RAM (load before start)
//   cen_*      write port of the centroid RAM (load before start)
//   asg_raddr/asg_rdata   read port of the assignment RAM, 1 cycle latency
//   dbg_*      the signals probed by the on-chip logic analyser in the source
//              design: FSM state, iteration count, point index, valid bits
//              of the alignment pipeline, distance output, selector output.
// Reset is synchronous and active high.
module kmeans_top #(
  parameter int unsigned N_POINTS = 256,
  parameter int unsigned K        = 4,
  parameter int unsigned ITERS    = 5,
  parameter int unsigned ALIGN    = 5,
  parameter int unsigned PID_W    = (N_POINTS > 1) ? $clog2(N_POINTS) : 1,
  parameter int unsigned CID_W    = (K > 1) ? $clog2(K) : 1
) (
  input  logic                        clk,
  input  logic                        rst,
  input  logic                        start,
  output logic                        busy,
  output logic                        done,
  // point RAM load port
  input  logic                        pt_we,
  input  logic [PID_W-1:0]            pt_waddr,
  input  km_pkg::point_t              pt_wdata,
  // centroid RAM load port
  input  logic                        cen_we,
  input  logic [CID_W-1:0]            cen_waddr,
  input  km_pkg::point_t              cen_wdata,
  // assignment RAM read port
  input  logic [PID_W-1:0]            asg_raddr,
  output logic [CID_W-1:0]            asg_rdata,
  // debug probes
  output km_pkg::state_t              dbg_state,
  output logic [km_pkg::ITER_W-1:0]   dbg_iter_count,
  output logic [PID_W-1:0]            dbg_point_idx,
  output logic [ALIGN-1:0]            dbg_valid_pipe,
  output km_pkg::dist_t               dbg_edc_dist,
  output km_pkg::dist_t               dbg_min_dist,
  output logic [CID_W-1:0]            dbg_best_idx,
  output logic                        dbg_best_valid
);
  import km_pkg::*;

  // controller
  state_t              state;
  logic [PID_W-1:0]    pid;
  logic [CID_W-1:0]    cid;
  logic                issue_valid;
  logic [ITER_W-1:0]   iter;
  logic                fsm_done, fsm_busy;

  km_fsm #(
    .N_POINTS (N_POINTS), .K (K), .ITERS (ITERS), .FLUSH (ALIGN - 1),
    .PID_W (PID_W), .CID_W (CID_W)
  ) u_fsm (
    .clk, .rst, .start,
    .state, .pid, .cid, .issue_valid, .iter,
    .done (fsm_done), .busy (fsm_busy)
  );

  // RAMs addressed by the controller
  point_t pt_rdata, cen_rdata;

  km_point_mem #(.DEPTH (N_POINTS), .ADDR_W (PID_W)) u_points (
    .clk, .we (pt_we), .waddr (pt_waddr), .wdata (pt_wdata),
    .raddr (pid), .rdata (pt_rdata)
  );

  km_centroid_mem #(.K (K), .ADDR_W (CID_W)) u_centroids (
    .clk, .we (cen_we), .waddr (cen_waddr), .wdata (cen_wdata),
    .raddr (cid), .rdata (cen_rdata)
  );

  // distance pipeline
  dist_t edc_dist;

  km_edc u_edc (.clk, .a (pt_rdata), .b (cen_rdata), .dist_out (edc_dist));

  // indices and valid travelling beside the distance
  logic              al_valid;
  logic [PID_W-1:0]  al_pid;
  logic [CID_W-1:0]  al_cid;
  logic [ALIGN-1:0]  valid_pipe;

  km_pipe_align #(.DEPTH (ALIGN), .PID_W (PID_W), .CID_W (CID_W)) u_align (
    .clk, .rst,
    .valid_in (issue_valid), .pid_in (pid), .cid_in (cid),
    .valid_out (al_valid), .pid_out (al_pid), .cid_out (al_cid),
    .valid_pipe
  );

  // nearest-centroid selection
  dist_t             min_dist;
  logic [CID_W-1:0]  best_idx;
  logic              best_valid;

  km_min_selector #(.K (K), .IDX_W (CID_W)) u_min (
    .clk, .rst,
    .valid (al_valid), .start_point (al_valid && (al_cid == '0)),
    .dist_in (edc_dist), .idx (al_cid),
    .min_dist, .best_idx, .best_valid
  );

  // the point index, delayed to line up with the selector's output register
  logic [PID_W-1:0] wb_pid;
  always_ff @(posedge clk) wb_pid <= al_pid;

  km_assign_mem #(.DEPTH (N_POINTS), .K (K), .ADDR_W (PID_W), .IDX_W (CID_W)) u_assign (
    .clk, .we (best_valid), .waddr (wb_pid), .wdata (best_idx),
    .raddr (asg_raddr), .rdata (asg_rdata)
  );

  // status: the run is over only once the last assignment has been written
  wire in_flight = (|valid_pipe) || best_valid;
  assign busy = fsm_busy || in_flight;
  assign done = fsm_done && !in_flight;

  // debug probes
  assign dbg_state      = state;
  assign dbg_iter_count = iter;
  assign dbg_point_idx  = pid;
  assign dbg_valid_pipe = valid_pipe;
  assign dbg_edc_dist   = edc_dist;
  assign dbg_min_dist   = min_dist;
  assign dbg_best_idx   = best_idx;
  assign dbg_best_valid = best_valid;

  // the RAMs must not be reloaded while a run uses them
  property p_no_load_while_busy;
    @(posedge clk) disable iff (rst) busy |-> !(pt_we || cen_we);
  endproperty
  a_no_load_while_busy: assert property (p_no_load_while_busy)
    else $error("kmeans_top: RAM written while a run is in progress");
endmodule
