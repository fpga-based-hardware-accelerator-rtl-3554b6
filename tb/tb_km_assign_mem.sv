// tb_km_assign_mem: self-checking testbench of the assignment RAM
// (km_assign_mem).
//
// Writes a random cluster index to every word, reads all of them back and
// checks the one-cycle read latency, then rewrites part of the memory and
// checks that only the rewritten words changed.
module tb_km_assign_mem;
  localparam int unsigned DEPTH  = 256;
  localparam int unsigned K      = 4;
  localparam int unsigned ADDR_W = $clog2(DEPTH);
  localparam int unsigned IDX_W  = $clog2(K);

  logic clk = 1'b0;
  always #5 clk = ~clk;

  logic              we;
  logic [ADDR_W-1:0] waddr, raddr;
  logic [IDX_W-1:0]  wdata, rdata;

  km_assign_mem dut (.*);

  int checks = 0, failures = 0;
  logic [IDX_W-1:0] model [DEPTH];

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

  task automatic readback();
    logic [IDX_W-1:0] prev;
    for (int i = 0; i < DEPTH; i++) begin
      @(negedge clk);
      prev  = rdata;
      raddr = ADDR_W'(i);
      #1;
      check(rdata == prev, $sformatf("word %0d changed before the clock edge", i));
      @(posedge clk); #1;
      check(rdata == model[i], $sformatf("word %0d: got %0d expected %0d", i, rdata, model[i]));
    end
  endtask

  initial begin
    we = 1'b0; waddr = '0; raddr = '0; wdata = '0;
    @(posedge clk);
    for (int i = 0; i < DEPTH; i++) begin
      model[i] = IDX_W'($urandom_range(K - 1));
      @(negedge clk);
      we = 1'b1; waddr = ADDR_W'(i); wdata = model[i];
    end
    @(negedge clk) we = 1'b0;
    readback();
    // rewrite every third word
    for (int i = 0; i < DEPTH; i += 3) begin
      model[i] = model[i] + 1'b1;
      @(negedge clk);
      we = 1'b1; waddr = ADDR_W'(i); wdata = model[i];
    end
    @(negedge clk) we = 1'b0;
    readback();
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
