// tb_pmx_crossover: end-to-end test of the PMX crossover module.
// Three small instances run side by side, each driven by pmx_driver:
//   - 6 cities: the worked example p1 = (3 | 0 1 4 5 | 2), p2 = (2 | 1 3 5 4 | 0),
//     which must give (0 | 1 3 5 4 | 2) and (2 | 0 1 4 5 | 3), then random tours;
//   - 16 and 40 cities: random tours and cut points, including the extreme
//     cut points, and a parent with a repeated city to trigger bad_tour.
// Children, cycle counts and the occurrence of every controller mechanism
// (copy, mapping, chained mapping, both ways of leaving a part, Delay1,
// Delay2, bad-tour detection) are checked.
module tb_pmx_crossover;
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

  `PMX_BENCH(s6, 6, 30, 1'b1, 1'b0, checks_a, failures_a, fin_a)
  `PMX_BENCH(s16, 16, 200, 1'b0, 1'b1, checks_b, failures_b, fin_b)
  `PMX_BENCH(s40, 40, 100, 1'b0, 1'b1, checks_c, failures_c, fin_c)

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
