// pmx_crossover: partially-mapped crossover (PMX) of two TSP tours in place.
//
// Two parent tours of M cities are loaded into two flip-flop memories. With
// cut points cp1 <= cp2, each tour splits into a top part (0..cp1-1), a
// mapping segment (cp1..cp2) and a bottom part (cp2+1..M-1). PMX gives each
// child the other parent's segment and fills the rest from its own parent,
// replacing a city that already occurs in the inherited segment by the city
// at the same segment position in the other parent, repeatedly, until it no
// longer clashes.
//
// Only two chromosome memories are used: child 1 is built in the parent-2
// memory (which keeps parent 2's segment) and child 2 in the parent-1
// memory. Parent 2's top and bottom parts are first saved in a temporary
// memory, since building child 1 overwrites them. Clash checks use M
// parallel comparators (an associative search) over the segment, so one
// mapping step takes one clock cycle.
//
// Datapath per filled position k (controller in pmx_ctrl):
//   child 1: source = parent-1 memory[k], search the parent-2 memory's
//            segment, mapped gene = parent-1 memory[match], write the
//            parent-2 memory at k
//   child 2: source = temporary memory[k], search the parent-1 memory's
//            segment, mapped gene = parent-2 memory[match], write the
//            parent-1 memory at k
// The gene register `cur` holds the candidate between CMP1/CMP2 and the
// write.
//
// Host interface (this design's own, the paper does not define one):
//   ld_we/ld_sel/ld_addr/ld_data  write a parent gene while idle
//                                  (ld_sel 0: parent 1 / child 2 memory,
//                                   ld_sel 1: parent 2 / child 1 memory)
//   rd_sel/rd_addr -> rd_data      combinational read of either memory
//   start with cp1/cp2             begin a crossover (1 <= cp1 <= cp2 <= M-2)
//   busy, done                     done pulses for one cycle at the end;
//                                   child 1 is then in memory 1, child 2 in
//                                   memory 0
//   bad_tour                       high if a comparison found a city twice
//                                   in a segment (parents were not valid tours)
// Gene width is ceil(log2 M) + 1 bits, following the paper.
module pmx_crossover
  import pmx_pkg::*;
#(
  parameter int unsigned M  = 1024,
  parameter int unsigned W  = $clog2(M) + 1,
  parameter int unsigned AW = $clog2(M)
) (
  input  logic          clk,
  input  logic          rst_n,
  // parent loading
  input  logic          ld_we,
  input  logic          ld_sel,
  input  logic [AW-1:0] ld_addr,
  input  logic [W-1:0]  ld_data,
  // child readout
  input  logic          rd_sel,
  input  logic [AW-1:0] rd_addr,
  output logic [W-1:0]  rd_data,
  // control
  input  logic          start,
  input  logic [AW-1:0] cp1,
  input  logic [AW-1:0] cp2,
  output logic          busy,
  output logic          done,
  output logic          bad_tour
);

  // Controller outputs
  pmx_state_e    state;
  logic [AW-1:0] cp1_q, cp2_q, k, ct, cb;
  logic          top_we, bot_we, cmp_cur, cur_load, dest_we, phase2;

  // Comparator
  logic [W-1:0]  key;
  logic          hit, multi_hit;
  logic [AW-1:0] idx;

  // Memories
  logic          a_we, b_we;
  logic [AW-1:0] a_waddr, b_waddr;
  logic [W-1:0]  a_wdata, b_wdata;
  logic [AW-1:0] a_raddr [1];
  logic [W-1:0]  a_rdata [1];
  logic [AW-1:0] b_raddr [2];
  logic [W-1:0]  b_rdata [2];
  logic [W-1:0]  a_cells [M];
  logic [W-1:0]  b_cells [M];
  logic [W-1:0]  cmp_cells [M];
  logic [W-1:0]  t_rdata;

  logic [W-1:0]  cur;          // candidate gene for position k
  logic [W-1:0]  src_gene;     // gene of the source part at k
  logic [W-1:0]  mapped_gene;  // gene at the matching segment position

  pmx_ctrl #(.M(M), .AW(AW)) u_ctrl (
    .clk, .rst_n, .start,
    .cp1_in (cp1), .cp2_in (cp2),
    .hit,
    .state,
    .cp1 (cp1_q), .cp2 (cp2_q),
    .k, .ct, .cb,
    .top_we, .bot_we, .cmp_cur, .cur_load, .dest_we, .phase2,
    .busy, .done
  );

  // Memory A: parent 1, becomes child 2.
  // Read port 0: source gene for child 1, or host readout while idle.
  assign a_raddr[0] = busy ? k : rd_addr;
  assign a_we       = busy ? (dest_we && phase2)  : (ld_we && !ld_sel);
  assign a_waddr    = busy ? k   : ld_addr;
  assign a_wdata    = busy ? cur : ld_data;

  chrom_mem #(.M(M), .NR(1), .W(W), .AW(AW)) u_mem_a (
    .clk, .we (a_we), .waddr (a_waddr), .wdata (a_wdata),
    .raddr (a_raddr), .rdata (a_rdata), .cells (a_cells)
  );

  // Memory B: parent 2, becomes child 1.
  // Read ports 0/1: top and bottom copy words (port 0 serves host readout while idle).
  assign b_raddr[0] = busy ? ct : rd_addr;
  assign b_raddr[1] = cb;
  assign b_we       = busy ? (dest_we && !phase2) : (ld_we && ld_sel);
  assign b_waddr    = busy ? k   : ld_addr;
  assign b_wdata    = busy ? cur : ld_data;

  chrom_mem #(.M(M), .NR(2), .W(W), .AW(AW)) u_mem_b (
    .clk, .we (b_we), .waddr (b_waddr), .wdata (b_wdata),
    .raddr (b_raddr), .rdata (b_rdata), .cells (b_cells)
  );

  // Temporary memory: parent 2's top and bottom parts.
  temp_mem #(.M(M), .W(W), .AW(AW)) u_tmp (
    .clk,
    .top_we, .top_addr (ct), .top_wdata (b_rdata[0]),
    .bot_we, .bot_addr (cb), .bot_wdata (b_rdata[1]),
    .raddr (k), .rdata (t_rdata)
  );

  // Source, search target and mapping source switch between the two children.
  assign src_gene    = phase2 ? t_rdata    : a_rdata[0];
  // The mapped gene is read at the match position straight from the other
  // memory's flip-flops.
  assign mapped_gene = phase2 ? b_cells[idx] : a_cells[idx];
  assign cmp_cells   = phase2 ? a_cells    : b_cells;
  assign key         = cmp_cur ? cur : src_gene;

  assoc_cmp #(.M(M), .W(W), .AW(AW)) u_cmp (
    .key, .cells (cmp_cells), .lo (cp1_q), .hi (cp2_q),
    .hit, .idx, .multi_hit
  );

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)        cur <= '0;
    else if (cur_load) cur <= hit ? mapped_gene : key;
  end

  // Sticky flag: a segment held a city twice during this crossover.
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)                         bad_tour <= 1'b0;
    else if (!busy && start)            bad_tour <= 1'b0;
    else if (busy && !done && !(state inside {ST_COPY_SMPL, ST_DELAY1, ST_DELAY2}) && multi_hit)
                                        bad_tour <= 1'b1;
  end

  assign rd_data = rd_sel ? b_rdata[0] : a_rdata[0];

  // busy is low throughout reset, so the check needs no reset qualifier.
  a_no_load_when_busy: assert property (@(posedge clk) busy |-> !ld_we)
    else $error("pmx_crossover: parent write while a crossover runs");

endmodule
