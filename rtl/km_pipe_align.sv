// km_pipe_align: pipeline alignment registers.
//
// The controller issues a (point index, centroid index) pair with a valid
// bit; the distance for that pair appears DEPTH cycles later, after the RAM
// read (1 cycle) and the distance pipeline (4 cycles). This block carries the
// two indices and the valid bit through a DEPTH-stage shift register so that
// they reach the minimum selector in the same cycle as their distance. The
// five stages (cid_d1..cid_d5, pid_d1..pid_d5, valid_pipe[0..4]) follow the
// source design.
//
// Interface: valid_in/pid_in/cid_in enter; valid_out/pid_out/cid_out are the
// same values DEPTH cycles later. valid_pipe exposes every stage's valid bit
// for debug probes. Reset (synchronous, active high) clears the valid bits
// only; the indices are plain data registers.
module km_pipe_align #(
  parameter int unsigned DEPTH = 5,
  parameter int unsigned PID_W = 8,
  parameter int unsigned CID_W = 2
) (
  input  logic              clk,
  input  logic              rst,
  input  logic              valid_in,
  input  logic [PID_W-1:0]  pid_in,
  input  logic [CID_W-1:0]  cid_in,
  output logic              valid_out,
  output logic [PID_W-1:0]  pid_out,
  output logic [CID_W-1:0]  cid_out,
  output logic [DEPTH-1:0]  valid_pipe
);
  logic [PID_W-1:0] pid_pipe [DEPTH];
  logic [CID_W-1:0] cid_pipe [DEPTH];

  always_ff @(posedge clk) begin
    if (rst) valid_pipe <= '0;
    else     valid_pipe <= {valid_pipe[DEPTH-2:0], valid_in};
  end

  always_ff @(posedge clk) begin
    pid_pipe[0] <= pid_in;
    cid_pipe[0] <= cid_in;
    for (int i = 1; i < DEPTH; i++) begin
      pid_pipe[i] <= pid_pipe[i-1];
      cid_pipe[i] <= cid_pipe[i-1];
    end
  end

  assign valid_out = valid_pipe[DEPTH-1];
  assign pid_out   = pid_pipe[DEPTH-1];
  assign cid_out   = cid_pipe[DEPTH-1];

  initial assert (DEPTH >= 2) else $error("km_pipe_align: DEPTH must be at least 2");
endmodule
