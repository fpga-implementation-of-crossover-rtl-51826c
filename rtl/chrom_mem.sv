// chrom_mem: flip-flop memory for one chromosome (tour) of M cities.
//
// One instance holds parent 1 and is overwritten in place by child 2; the
// other holds parent 2 and is overwritten by child 1. Because the crossover
// compares a gene against many stored genes at once, the memory is built from
// flip-flops rather than block RAM, and its whole contents are brought out on
// `cells` for the associative comparators.
//
// Interface: one synchronous write port (we/waddr/wdata, written at the rising
// clock edge) and NR asynchronous read ports (raddr[i] -> rdata[i]).
// Gene width W = ceil(log2 M) + 1 bits, as in the paper's flip-flop count.
// The number of read ports and the lack of a reset on the contents (they are
// always loaded before use) are this design's choices.
module chrom_mem #(
  parameter int unsigned M  = 1024,
  parameter int unsigned NR = 2,
  parameter int unsigned W  = $clog2(M) + 1,
  parameter int unsigned AW = $clog2(M)
) (
  input  logic          clk,
  input  logic          we,
  input  logic [AW-1:0] waddr,
  input  logic [W-1:0]  wdata,
  input  logic [AW-1:0] raddr [NR],
  output logic [W-1:0]  rdata [NR],
  output logic [W-1:0]  cells [M]
);

  logic [W-1:0] mem [M];

  always_ff @(posedge clk) begin
    if (we) mem[waddr] <= wdata;
  end

  always_comb begin
    for (int i = 0; i < int'(NR); i++) rdata[i] = mem[raddr[i]];
  end

  assign cells = mem;

  a_waddr_range: assert property (@(posedge clk) we |-> int'(waddr) < int'(M))
    else $error("chrom_mem: write address %0d out of range", waddr);

endmodule
