// assoc_cmp: associative (content-addressed) search of a crossover segment.
//
// M equality comparators, one per stored gene, compare `key` with every gene
// of a chromosome in the same cycle, the way a fully associative cache
// compares a tag with all its tags. Only genes whose position lies in the
// crossover segment [lo, hi] (the mapping section, P2 or P5) may match.
// `hit` says whether the key occurs in the segment and `idx` gives its
// position, which the caller uses to look up the mapped gene in the other
// chromosome.
//
// Purely combinational. In a valid tour every city occurs once, so at most one
// comparator fires and the position is encoded with a plain OR of the
// matching indices instead of a priority encoder (this design's choice).
// `multi_hit` flags a key found more than once, which only an invalid tour
// (a repeated city) can cause.
module assoc_cmp #(
  parameter int unsigned M  = 1024,
  parameter int unsigned W  = $clog2(M) + 1,
  parameter int unsigned AW = $clog2(M)
) (
  input  logic [W-1:0]  key,
  input  logic [W-1:0]  cells [M],
  input  logic [AW-1:0] lo,
  input  logic [AW-1:0] hi,
  output logic          hit,
  output logic [AW-1:0] idx,
  output logic          multi_hit
);

  logic [M-1:0] match;

  always_comb begin
    for (int j = 0; j < int'(M); j++) begin
      match[j] = (cells[j] == key) && (AW'(j) >= lo) && (AW'(j) <= hi);
    end
  end

  always_comb begin
    idx = '0;
    for (int j = 0; j < int'(M); j++) begin
      if (match[j]) idx = idx | AW'(j);
    end
  end

  assign hit = |match;
  // Clearing the lowest set bit leaves something only if two or more bits were set.
  assign multi_hit = |(match & (match - 1'b1));

endmodule
