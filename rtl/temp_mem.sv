// temp_mem: temporary memory that saves the outer parts of parent 2.
//
// Child 1 is built inside the parent-2 memory, which destroys parent 2's top
// part (before the first cut point, P4-1) and bottom part (after the second
// cut point, P6-1). Before that happens both parts are copied here, each to
// the same address it had in parent 2, so that child 2 can later be built
// from them. Top and bottom are filled in parallel, so the memory has two
// write ports (top and bottom) and one asynchronous read port.
//
// Timing: writes take effect at the rising clock edge; reads are combinational.
// The two write ports must not address the same word in the same cycle.
// Storing both parts in one M-word array is this design's choice; the
// flip-flop count (one M x W memory) follows the paper.
module temp_mem #(
  parameter int unsigned M  = 1024,
  parameter int unsigned W  = $clog2(M) + 1,
  parameter int unsigned AW = $clog2(M)
) (
  input  logic          clk,
  input  logic          top_we,
  input  logic [AW-1:0] top_addr,
  input  logic [W-1:0]  top_wdata,
  input  logic          bot_we,
  input  logic [AW-1:0] bot_addr,
  input  logic [W-1:0]  bot_wdata,
  input  logic [AW-1:0] raddr,
  output logic [W-1:0]  rdata
);

  logic [W-1:0] mem [M];

  always_ff @(posedge clk) begin
    if (top_we) mem[top_addr] <= top_wdata;
    if (bot_we) mem[bot_addr] <= bot_wdata;
  end

  assign rdata = mem[raddr];

  a_no_collision: assert property (@(posedge clk) !(top_we && bot_we && top_addr == bot_addr))
    else $error("temp_mem: both write ports address word %0d", top_addr);

endmodule
