// tb_pmx_full: the crossover module at its default size (1024 cities).
// Twenty-three crossovers of random 1024-city tours (three with extreme cut
// points, twenty with random ones), each checked gene by gene against a
// software PMX and for its exact cycle count; the average, minimum and maximum
// cycle counts are printed. Three more runs cross 128-city tours padded to
// 1024 cities, and one parent with a repeated city checks bad_tour. The module is instantiated with its default
// parameters.
module tb_pmx_full;
  import pmx_pkg::*;
  localparam int unsigned M = 1024, W = $clog2(M) + 1, AW = $clog2(M);

  logic clk = 1'b0;
  always #5 clk = ~clk;

  logic          rst_n, ld_we, ld_sel, rd_sel, start, busy, done, bad_tour;
  logic [AW-1:0] ld_addr, rd_addr, cp1, cp2;
  logic [W-1:0]  ld_data, rd_data;
  int checks, failures;
  logic finished;

  pmx_crossover dut (.clk, .rst_n, .ld_we, .ld_sel, .ld_addr, .ld_data, .rd_sel, .rd_addr,
                     .rd_data, .start, .cp1, .cp2, .busy, .done, .bad_tour);

  pmx_driver #(.M(M), .RUNS(20), .EXAMPLE(1'b0), .BAD_TOUR(1'b1), .PAD_RUNS(3), .PAD_LEN(128)) drv (
    .clk, .rst_n, .ld_we, .ld_sel, .ld_addr, .ld_data, .rd_sel, .rd_addr, .rd_data,
    .start, .cp1, .cp2, .busy, .done, .bad_tour, .state(dut.state),
    .checks, .failures, .finished);

  initial begin
    wait (finished);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2000000) @(posedge clk);
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end
endmodule
