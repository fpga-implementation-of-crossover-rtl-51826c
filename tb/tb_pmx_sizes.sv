// tb_pmx_sizes: crossover speed at 128, 256 and 512 cities.
// Runs twenty random crossovers (plus three with extreme cut points) at each
// of these tour lengths side by side, checks every child and cycle count
// against a software PMX, and prints the average, minimum and maximum number
// of clock cycles per crossover for each size. (1024 cities is covered by
// tb_pmx_full.)
module tb_pmx_sizes;
  logic clk = 1'b0;
  always #5 clk = ~clk;

  int checks_a, failures_a, checks_b, failures_b, checks_c, failures_c;
  logic fin_a, fin_b, fin_c;

  `define PMX_BENCH(NAME, MM, RUNS_, EX, BAD, CHK, FAIL, FIN) \
    localparam int unsigned NAME``_W  = $clog2(MM) + 1; \
    localparam int unsigned NAME``_AW = $clog2(MM); \
    logic NAME``_rst_n, NAME``_ld_we, NAME``_ld_sel, NAME``_rd_sel, NAME``_start; \
    logic NAME``_busy, NAME``_done, NAME``_bad; \
    logic [NAME``_AW-1:0] NAME``_ld_addr, NAME``_rd_addr, NAME``_cp1, NAME``_cp2; \
    logic [NAME``_W-1:0] NAME``_ld_data, NAME``_rd_data; \
    pmx_crossover #(.M(MM)) NAME``_dut ( \
      .clk, .rst_n(NAME``_rst_n), .ld_we(NAME``_ld_we), .ld_sel(NAME``_ld_sel), \
      .ld_addr(NAME``_ld_addr), .ld_data(NAME``_ld_data), .rd_sel(NAME``_rd_sel), \
      .rd_addr(NAME``_rd_addr), .rd_data(NAME``_rd_data), .start(NAME``_start), \
      .cp1(NAME``_cp1), .cp2(NAME``_cp2), .busy(NAME``_busy), .done(NAME``_done), \
      .bad_tour(NAME``_bad)); \
    pmx_driver #(.M(MM), .RUNS(RUNS_), .EXAMPLE(EX), .BAD_TOUR(BAD)) NAME``_drv ( \
      .clk, .rst_n(NAME``_rst_n), .ld_we(NAME``_ld_we), .ld_sel(NAME``_ld_sel), \
      .ld_addr(NAME``_ld_addr), .ld_data(NAME``_ld_data), .rd_sel(NAME``_rd_sel), \
      .rd_addr(NAME``_rd_addr), .rd_data(NAME``_rd_data), .start(NAME``_start), \
      .cp1(NAME``_cp1), .cp2(NAME``_cp2), .busy(NAME``_busy), .done(NAME``_done), \
      .bad_tour(NAME``_bad), .state(NAME``_dut.state), \
      .checks(CHK), .failures(FAIL), .finished(FIN));

  `PMX_BENCH(s128, 128, 20, 1'b0, 1'b0, checks_a, failures_a, fin_a)
  `PMX_BENCH(s256, 256, 20, 1'b0, 1'b0, checks_b, failures_b, fin_b)
  `PMX_BENCH(s512, 512, 20, 1'b0, 1'b0, checks_c, failures_c, fin_c)

  initial begin
    wait (fin_a && fin_b && fin_c);
    $display("TB_RESULT checks=%0d failures=%0d", checks_a + checks_b + checks_c,
             failures_a + failures_b + failures_c);
    $finish;
  end

  initial begin
    repeat (2000000) @(posedge clk);
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks_a + checks_b + checks_c,
             failures_a + failures_b + failures_c + 1);
    $finish;
  end
endmodule
