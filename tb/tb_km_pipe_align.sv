// tb_km_pipe_align: self-checking testbench of the alignment registers
// (km_pipe_align).
//
// Drives random valid bits and indices every cycle and checks that each
// output equals the input of exactly DEPTH = 5 cycles before, that every
// stage of valid_pipe holds the matching delayed valid bit, and that reset
// clears all valid bits.
module tb_km_pipe_align;
  localparam int unsigned DEPTH = 5;
  localparam int unsigned PID_W = 8;
  localparam int unsigned CID_W = 2;
  localparam int          N     = 1000;

  logic clk = 1'b0;
  always #5 clk = ~clk;

  logic              rst, valid_in, valid_out;
  logic [PID_W-1:0]  pid_in, pid_out;
  logic [CID_W-1:0]  cid_in, cid_out;
  logic [DEPTH-1:0]  valid_pipe;

  km_pipe_align dut (.*);

  int checks = 0, failures = 0;
  // history of inputs, newest first
  logic              hv [DEPTH];
  logic [PID_W-1:0]  hp [DEPTH];
  logic [CID_W-1:0]  hc [DEPTH];

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  initial begin
    repeat (N + 100) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    rst = 1'b1; valid_in = 1'b0; pid_in = '0; cid_in = '0;
    for (int i = 0; i < DEPTH; i++) begin hv[i] = 1'b0; hp[i] = '0; hc[i] = '0; end
    repeat (2) @(posedge clk);
    @(negedge clk) rst = 1'b0;
    for (int i = 0; i < N; i++) begin
      // apply, then shift the history at the edge
      valid_in = 1'($urandom());
      pid_in   = PID_W'($urandom());
      cid_in   = CID_W'($urandom());
      if (i == N / 2) rst = 1'b1;
      @(posedge clk);
      for (int s = DEPTH - 1; s > 0; s--) begin
        hv[s] = hv[s-1]; hp[s] = hp[s-1]; hc[s] = hc[s-1];
      end
      hv[0] = rst ? 1'b0 : valid_in; hp[0] = pid_in; hc[0] = cid_in;
      if (rst) for (int s = 1; s < DEPTH; s++) hv[s] = 1'b0;
      @(negedge clk);
      if (rst) begin
        check(valid_pipe == '0, "reset did not clear the valid bits");
        rst = 1'b0;
      end else begin
        check(valid_out == hv[DEPTH-1], $sformatf("cycle %0d: valid_out", i));
        if (i >= DEPTH) begin
          check(pid_out == hp[DEPTH-1], $sformatf("cycle %0d: pid_out %0d expected %0d", i, pid_out, hp[DEPTH-1]));
          check(cid_out == hc[DEPTH-1], $sformatf("cycle %0d: cid_out %0d expected %0d", i, cid_out, hc[DEPTH-1]));
        end
        for (int s = 0; s < DEPTH; s++)
          check(valid_pipe[s] == hv[s], $sformatf("cycle %0d: valid_pipe[%0d]", i, s));
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
