// tb_assoc_cmp: self-checking test of the associative segment search.
// Loads random permutations of 32 cities, picks random segments and keys
// (inside the segment, elsewhere in the tour, and absent), and compares
// hit/idx with a sequential search done by the testbench. Also checks that a
// city stored twice in the segment raises multi_hit.
module tb_assoc_cmp;
  localparam int unsigned M = 32, W = $clog2(M) + 1, AW = $clog2(M);

  logic [W-1:0]  key;
  logic [W-1:0]  cells [M];
  logic [AW-1:0] lo, hi;
  logic          hit, multi_hit;
  logic [AW-1:0] idx;
  logic          clk = 1'b0;
  int checks = 0, failures = 0;
  int n_hit = 0, n_miss = 0;

  assoc_cmp #(.M(M)) dut (.key, .cells, .lo, .hi, .hit, .idx, .multi_hit);

  always #5 clk = ~clk;

  task automatic shuffle();
    int j;
    logic [W-1:0] t;
    for (int i = 0; i < int'(M); i++) cells[i] = W'(i);
    for (int i = int'(M) - 1; i > 0; i--) begin
      j = $urandom_range(i, 0);
      t = cells[i]; cells[i] = cells[j]; cells[j] = t;
    end
  endtask

  task automatic check_key();
    bit exp_hit = 1'b0;
    int exp_idx = 0;
    for (int j = int'(lo); j <= int'(hi); j++)
      if (cells[j] == key) begin exp_hit = 1'b1; exp_idx = j; end
    #1;
    checks++;
    if (hit !== exp_hit || (exp_hit && idx !== AW'(exp_idx)) || multi_hit) begin
      failures++;
      $display("FAIL key %0d seg [%0d,%0d]: hit %0d idx %0d multi %0d, expected hit %0d idx %0d",
               key, lo, hi, hit, idx, multi_hit, exp_hit, exp_idx);
    end
    if (exp_hit) n_hit++; else n_miss++;
  endtask

  initial begin
    int a, b;
    for (int it = 0; it < 300; it++) begin
      shuffle();
      a = $urandom_range(M - 1, 0); b = $urandom_range(M - 1, 0);
      lo = AW'(a < b ? a : b); hi = AW'(a < b ? b : a);
      key = cells[$urandom_range(hi, lo)];       check_key();   // in the segment
      key = cells[$urandom_range(M - 1, 0)];     check_key();   // anywhere
      key = W'(M + $urandom_range(M - 1, 0));    check_key();   // not a city
    end
    // Duplicate inside the segment.
    shuffle();
    lo = 4; hi = 20; cells[10] = cells[15]; key = cells[15];
    #1;
    checks++;
    if (!multi_hit || !hit) begin
      failures++;
      $display("FAIL duplicate not flagged");
    end
    checks++;
    if (n_hit == 0 || n_miss == 0) begin
      failures++;
      $display("FAIL hit/miss not both exercised");
    end
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
