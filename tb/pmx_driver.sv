// pmx_driver: test driver and reference model for pmx_crossover.
//
// Connected to a pmx_crossover instance that the enclosing testbench creates.
// For every run it builds two parent tours (random permutations of 0..M-1,
// or the worked 6-city example when EXAMPLE is set), picks cut points,
// loads the parents through the load port, starts the crossover, waits for
// `done`, reads both children back and compares them with a software PMX
// computed here. It also predicts the run's cycle count:
//   max(cp1, M-1-cp2)                     copy of parent 2's outer parts
//   + per filled position 2 + (steps-1)   steps = mapping steps, if >= 1
//   + 2 Delay cycles + 1 Finish cycle
// and counts how often each controller mechanism occurred (copy step,
// mapping, chained mapping, each way of leaving a part, both Delay states).
// With PAD_RUNS set it also runs PAD_LEN-city tours padded to M cities.
// With BAD_TOUR set it finally loads a parent whose segment repeats a city
// and checks that `bad_tour` rises; the crossover is then aborted by reset.
// Results come back on checks/failures; `finished` rises at the end.
module pmx_driver
  import pmx_pkg::*;
#(
  parameter int unsigned M        = 16,
  parameter int unsigned RUNS     = 20,
  parameter bit          EXAMPLE  = 1'b0,
  parameter bit          BAD_TOUR = 1'b0,
  parameter bit          REQUIRE_ALL = 1'b1,
  parameter int unsigned PAD_RUNS = 0,   // extra runs with a PAD_LEN-city tour
  parameter int unsigned PAD_LEN  = 0,   // padded with cities PAD_LEN..M-1
  parameter int unsigned W  = $clog2(M) + 1,
  parameter int unsigned AW = $clog2(M)
) (
  input  logic          clk,
  output logic          rst_n,
  output logic          ld_we,
  output logic          ld_sel,
  output logic [AW-1:0] ld_addr,
  output logic [W-1:0]  ld_data,
  output logic          rd_sel,
  output logic [AW-1:0] rd_addr,
  input  logic [W-1:0]  rd_data,
  output logic          start,
  output logic [AW-1:0] cp1,
  output logic [AW-1:0] cp2,
  input  logic          busy,
  input  logic          done,
  input  logic          bad_tour,
  input  pmx_state_e    state,
  output int            checks,
  output int            failures,
  output logic          finished
);

  int p1 [M], p2 [M], c1 [M], c2 [M];
  localparam int EX_P1 [6] = '{3, 0, 1, 4, 5, 2};
  localparam int EX_P2 [6] = '{2, 1, 3, 5, 4, 0};
  localparam int EX_O1 [6] = '{0, 1, 3, 5, 4, 2};
  localparam int EX_O2 [6] = '{2, 0, 1, 4, 5, 3};
  int n_copy, n_map, n_chain, n_cmp2_exit, n_count_exit, n_delay1, n_delay2, n_bad, n_pad;
  longint total_cycles;
  int min_cycles, max_cycles;
  pmx_state_e prev_state;
  bit stats_on = 1'b1;       // padded runs are kept out of the statistics

  initial begin
    rst_n = 1'b0; ld_we = 1'b0; ld_sel = 1'b0; ld_addr = '0; ld_data = '0;
    rd_sel = 1'b0; rd_addr = '0; start = 1'b0; cp1 = '0; cp2 = '0;
    checks = 0; failures = 0; finished = 1'b0;
    n_copy = 0; n_map = 0; n_chain = 0; n_cmp2_exit = 0; n_count_exit = 0;
    n_delay1 = 0; n_delay2 = 0; n_bad = 0; n_pad = 0;
    total_cycles = 0; min_cycles = '1 >> 1; max_cycles = 0;
  end

  function automatic bit is_cmp2(pmx_state_e s);
    return s inside {ST_CMP2_TOP_1, ST_CMP2_BTM_1, ST_CMP2_TOP_2, ST_CMP2_BTM_2};
  endfunction
  function automatic bit is_count(pmx_state_e s);
    return s inside {ST_COUNT_TOP_1, ST_COUNT_BTM_1, ST_COUNT_TOP_2, ST_COUNT_BTM_2};
  endfunction
  // The controller left a part for the next one (or for Finish).
  function automatic bit part_done(pmx_state_e prev, pmx_state_e s);
    return (s inside {ST_DELAY1, ST_DELAY2, ST_FINISH}) ||
           (s == ST_CMP1_TOP_2 && prev inside {ST_CMP2_BTM_1, ST_COUNT_BTM_1});
  endfunction

  // Mechanism counters, sampled on every clock.
  always @(posedge clk) begin
    if (rst_n) begin
      if (state == ST_COPY_SMPL && prev_state != ST_COPY_SMPL) n_copy++;
      if (is_cmp2(state) && !is_cmp2(prev_state)) n_map++;
      if (is_cmp2(state) && state == prev_state) n_chain++;
      if (part_done(prev_state, state) && is_cmp2(prev_state)) n_cmp2_exit++;
      if (part_done(prev_state, state) && is_count(prev_state)) n_count_exit++;
      if (state == ST_DELAY1) n_delay1++;
      if (state == ST_DELAY2) n_delay2++;
      prev_state <= state;
    end else prev_state <= ST_IDLE;
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL [M=%0d] %s", M, what);
    end
  endtask

  task automatic shuffle(ref int p [M]);
    int j, t;
    for (int i = 0; i < int'(M); i++) p[i] = i;
    for (int i = int'(M) - 1; i > 0; i--) begin
      j = $urandom_range(i, 0);
      t = p[i]; p[i] = p[j]; p[j] = t;
    end
  endtask

  task automatic shuffle_prefix(ref int p [M], input int len);
    int j, t;
    for (int i = 0; i < int'(M); i++) p[i] = i;
    for (int i = len - 1; i > 0; i--) begin
      j = $urandom_range(i, 0);
      t = p[i]; p[i] = p[j]; p[j] = t;
    end
  endtask

  // Software PMX; returns the predicted cycle count.
  function automatic int reference(int lo, int hi);
    int cyc, x, steps, nxt;
    bit found;
    cyc = (lo > int'(M) - 1 - hi) ? lo : int'(M) - 1 - hi;
    for (int i = 0; i < int'(M); i++) begin
      if (i >= lo && i <= hi) begin
        c1[i] = p2[i];
        c2[i] = p1[i];
      end
    end
    for (int pass = 0; pass < 2; pass++) begin
      for (int i = 0; i < int'(M); i++) begin
        if (i >= lo && i <= hi) continue;
        x = (pass == 0) ? p1[i] : p2[i];
        steps = 0;
        do begin
          found = 0;
          for (int j = lo; j <= hi; j++) begin
            if (((pass == 0) ? p2[j] : p1[j]) == x) begin
              found = 1;
              nxt = (pass == 0) ? p1[j] : p2[j];
            end
          end
          if (found) begin x = nxt; steps++; end
        end while (found && steps <= int'(M));
        if (pass == 0) c1[i] = x; else c2[i] = x;
        cyc += 2 + ((steps > 0) ? steps - 1 : 0);
      end
    end
    return cyc + 3;
  endfunction

  task automatic load_parents();
    for (int s = 0; s < 2; s++) begin
      for (int i = 0; i < int'(M); i++) begin
        @(negedge clk);
        ld_we = 1'b1; ld_sel = 1'(s); ld_addr = AW'(i);
        ld_data = W'((s == 0) ? p1[i] : p2[i]);
      end
    end
    @(negedge clk);
    ld_we = 1'b0;
  endtask

  task automatic run_one(input int lo, input int hi);
    int exp_cycles, cycles;
    bit seen [M];
    exp_cycles = reference(lo, hi);
    load_parents();
    cp1 = AW'(lo); cp2 = AW'(hi);
    start = 1'b1;
    @(negedge clk);
    start = 1'b0;
    cycles = 0;
    while (!done && cycles < 20 * int'(M) + 100) begin
      cycles++;
      @(negedge clk);
    end
    cycles++;                 // the Finish cycle, in which done is high
    check(done, "done never came");
    if (!done) begin          // abort the hung crossover
      rst_n = 1'b0;
      @(negedge clk);
      rst_n = 1'b1;
    end
    @(negedge clk);
    check(!busy, "busy after Finish");
    check(!bad_tour, "bad_tour on valid parents");
    check(cycles == exp_cycles,
          $sformatf("cycles %0d expected %0d (cp %0d,%0d)", cycles, exp_cycles, lo, hi));
    if (stats_on) begin
      total_cycles += cycles;
      if (cycles < min_cycles) min_cycles = cycles;
      if (cycles > max_cycles) max_cycles = cycles;
    end
    // Child 1 is in memory 1 (parent 2's), child 2 in memory 0 (parent 1's).
    for (int s = 0; s < 2; s++) begin
      foreach (seen[i]) seen[i] = 1'b0;
      for (int i = 0; i < int'(M); i++) begin
        rd_sel = 1'(1 - s); rd_addr = AW'(i);
        #1;
        check(int'(rd_data) == ((s == 0) ? c1[i] : c2[i]),
              $sformatf("child %0d gene %0d: got %0d expected %0d",
                        s + 1, i, rd_data, (s == 0) ? c1[i] : c2[i]));
        if (int'(rd_data) < int'(M)) seen[rd_data] = 1'b1;
      end
      for (int i = 0; i < int'(M); i++) check(seen[i], $sformatf("child %0d lacks city %0d", s + 1, i));
      @(negedge clk);
    end
  endtask

  initial begin
    int a, b;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    @(negedge clk);
    if (EXAMPLE && M == 6) begin
      // p1 = (3 | 0 1 4 5 | 2), p2 = (2 | 1 3 5 4 | 0)
      // children (0 | 1 3 5 4 | 2) and (2 | 0 1 4 5 | 3)
      for (int i = 0; i < 6; i++) begin
        p1[i] = EX_P1[i];
        p2[i] = EX_P2[i];
      end
      run_one(1, 4);
      for (int i = 0; i < 6; i++) begin
        check(c1[i] == EX_O1[i], "reference child 1 of the worked example");
        check(c2[i] == EX_O2[i], "reference child 2 of the worked example");
      end
    end
    // Extreme cut points, then random ones.
    shuffle(p1); shuffle(p2); run_one(1, int'(M) - 2);
    shuffle(p1); shuffle(p2); run_one(int'(M) - 2, int'(M) - 2);
    shuffle(p1); shuffle(p2); run_one(1, 1);
    for (int r = 0; r < int'(RUNS); r++) begin
      shuffle(p1); shuffle(p2);
      a = $urandom_range(M - 2, 1); b = $urandom_range(M - 2, 1);
      run_one(a < b ? a : b, a < b ? b : a);
    end
    // Short tours on this build: positions PAD_LEN..M-1 hold the same
    // padding cities in both parents and lie after the second cut point, so
    // the first PAD_LEN genes of each child must be the PMX of the short tours.
    stats_on = 1'b0;
    for (int r = 0; r < int'(PAD_RUNS); r++) begin
      shuffle_prefix(p1, PAD_LEN); shuffle_prefix(p2, PAD_LEN);
      a = $urandom_range(PAD_LEN - 2, 1); b = $urandom_range(PAD_LEN - 2, 1);
      run_one(a < b ? a : b, a < b ? b : a);
      n_pad++;
    end
    if (BAD_TOUR) begin
      // Parent 2's segment repeats the city that parent 1 holds at position 0.
      shuffle(p1); shuffle(p2);
      p2[1] = p1[0]; p2[2] = p1[0];
      load_parents();
      cp1 = AW'(1); cp2 = AW'(M - 2);
      start = 1'b1;
      @(negedge clk);
      start = 1'b0;
      for (int i = 0; i < 2 * int'(M) && !bad_tour; i++) @(negedge clk);
      check(bad_tour, "bad_tour not raised for a repeated city");
      if (bad_tour) n_bad++;
      rst_n = 1'b0;
      @(negedge clk);
      rst_n = 1'b1;
      @(negedge clk);
    end
    $display("[M=%0d] %0d crossovers: average %0d cycles, min %0d, max %0d", M,
             int'(RUNS) + 3 + ((EXAMPLE && M == 6) ? 1 : 0),
             int'(total_cycles / (int'(RUNS) + 3 + ((EXAMPLE && M == 6) ? 1 : 0))),
             min_cycles, max_cycles);
    $display("[M=%0d] mechanisms: copy %0d, mapping %0d, chained mapping %0d, part left from CMP2 %0d, part left from COUNT %0d, Delay1 %0d, Delay2 %0d, bad tour %0d",
             M, n_copy, n_map, n_chain, n_cmp2_exit, n_count_exit, n_delay1, n_delay2, n_bad);
    check(n_copy > 0 && n_map > 0 && n_delay1 > 0 && n_delay2 > 0, "copy/mapping/Delay states exercised");
    if (REQUIRE_ALL) begin
      check(n_chain > 0, "chained mapping exercised");
      check(n_cmp2_exit > 0, "part left from CMP2 exercised");
      check(n_count_exit > 0, "part left from COUNT exercised");
    end
    if (BAD_TOUR) check(n_bad > 0, "bad tour detection exercised");
    if (PAD_RUNS > 0) begin
      $display("[M=%0d] %0d padded runs of %0d-city tours", M, n_pad, PAD_LEN);
      check(n_pad == int'(PAD_RUNS), "padded short-tour runs");
    end
    finished = 1'b1;
  end

endmodule
