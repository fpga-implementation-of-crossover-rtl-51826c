// tb_chrom_mem: self-checking test of the chromosome memory.
// Fills a 16-word memory, then mixes random writes with reads on both read
// ports and on the parallel `cells` output, comparing everything with a
// shadow array kept by the testbench. A watchdog ends a hung run.
module tb_chrom_mem;
  localparam int unsigned M = 16, NR = 2, W = $clog2(M) + 1, AW = $clog2(M);

  logic          clk = 1'b0;
  logic          we = 1'b0;
  logic [AW-1:0] waddr = '0;
  logic [W-1:0]  wdata = '0;
  logic [AW-1:0] raddr [NR];
  logic [W-1:0]  rdata [NR];
  logic [W-1:0]  cells [M];
  logic [W-1:0]  shadow [M];
  int checks = 0, failures = 0;

  chrom_mem #(.M(M), .NR(NR)) dut (.clk, .we, .waddr, .wdata, .raddr, .rdata, .cells);

  always #5 clk = ~clk;

  task automatic check(input logic [W-1:0] got, input logic [W-1:0] exp, input string what);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %0d expected %0d", what, got, exp);
    end
  endtask

  task automatic write(input int a, input logic [W-1:0] d);
    @(negedge clk);
    we = 1'b1; waddr = AW'(a); wdata = d;
    @(negedge clk);
    we = 1'b0;
    shadow[a] = d;
  endtask

  initial begin
    raddr[0] = '0; raddr[1] = '0;
    for (int a = 0; a < int'(M); a++) write(a, W'($urandom));
    for (int it = 0; it < 200; it++) begin
      if ($urandom_range(1, 0) == 1) write($urandom_range(M - 1, 0), W'($urandom));
      @(negedge clk);
      raddr[0] = AW'($urandom); raddr[1] = AW'($urandom);
      #1;
      check(rdata[0], shadow[raddr[0]], "read port 0");
      check(rdata[1], shadow[raddr[1]], "read port 1");
      for (int j = 0; j < int'(M); j++) check(cells[j], shadow[j], "cells");
    end
    // A write with we low must not change anything.
    @(negedge clk); we = 1'b0; waddr = 3; wdata = ~shadow[3];
    @(negedge clk); #1;
    check(cells[3], shadow[3], "no write when we low");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
