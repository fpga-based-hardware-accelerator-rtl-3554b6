// tb_km_centroid_mem: self-checking testbench of the centroid RAM
// (km_centroid_mem).
//
// Fills every word with random {x, y} points through the write port, reads
// them all back several times, rewriting one word between rounds, and
// checks each word arrives exactly one cycle after its address (and not in
// the same cycle), then checks that a read of the word being written in the
// same cycle returns the old contents.
module tb_km_centroid_mem;
  import km_pkg::*;

  localparam int unsigned K = 4;
  localparam int          ROUNDS = 64;
  localparam int unsigned ADDR_W = $clog2(K);

  logic clk = 1'b0;
  always #5 clk = ~clk;

  logic              we;
  logic [ADDR_W-1:0] waddr, raddr;
  point_t            wdata, rdata;

  km_centroid_mem dut (.*);

  int checks = 0, failures = 0;
  point_t model [K];

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    we = 1'b0; waddr = '0; raddr = '0; wdata = '0;
    @(posedge clk);
    // fill
    for (int i = 0; i < K; i++) begin
      model[i] = point_t'($urandom());
      @(negedge clk);
      we = 1'b1; waddr = ADDR_W'(i); wdata = model[i];
    end
    @(negedge clk) we = 1'b0;
    // read back, ROUNDS times over: the word must arrive after the clock
    // edge that follows its address, not before
    for (int r = 0; r < ROUNDS; r++) begin
      for (int i = 0; i < K; i++) begin
        int j;
        point_t prev;
        j = (r % 2) ? i : K - 1 - i;
        @(negedge clk);
        prev  = rdata;
        raddr = ADDR_W'(j);
        #1;
        check(rdata == prev, $sformatf("word %0d visible before the clock edge", j));
        @(posedge clk); #1;
        check(rdata == model[j], $sformatf("word %0d: got %h expected %h", j, rdata, model[j]));
      end
      // rewrite one random word between rounds
      begin
        int w;
        w = $urandom_range(K - 1);
        model[w] = point_t'($urandom());
        @(negedge clk);
        we = 1'b1; waddr = ADDR_W'(w); wdata = model[w];
        @(negedge clk) we = 1'b0;
      end
    end
    // read during write of the same address returns the old word
    @(negedge clk);
    raddr = ADDR_W'(1); waddr = ADDR_W'(1); we = 1'b1;
    wdata = ~model[1];
    @(posedge clk); #1;
    check(rdata == model[1], "read-during-write did not return the old word");
    model[1] = ~model[1];
    @(negedge clk) we = 1'b0;
    @(posedge clk); #1;
    check(rdata == model[1], "written word not read back");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
