// tb_pmx_ctrl: self-checking test of the crossover controller on its own.
// The comparator result `hit` is driven by the testbench at random, standing in
// for repeated cities and mapping chains. For many cut-point pairs (including
// the extreme ones) it checks:
//   - the copy step writes every top word (0..cp1-1) and every bottom word
//     (cp2+1..M-1) once, top and bottom in parallel;
//   - the child writes come in order 0..cp1-1, cp2+1..M-1 for child 1 and
//     again for child 2, one write per position;
//   - the gene register is loaded in CMP1 and on every further mapping step;
//   - the run takes max(cp1, M-1-cp2) copy cycles, two cycles per filled
//     position plus one per extra mapping step, two Delay cycles and Finish.
module tb_pmx_ctrl;
  import pmx_pkg::*;
  localparam int unsigned M = 16, AW = $clog2(M);

  logic          clk = 1'b0, rst_n = 1'b0, start = 1'b0, hit = 1'b0;
  logic [AW-1:0] cp1_in = '0, cp2_in = '0;
  pmx_state_e    state;
  logic [AW-1:0] cp1, cp2, k, ct, cb;
  logic          top_we, bot_we, cmp_cur, cur_load, dest_we, phase2, busy, done;
  int checks = 0, failures = 0;

  pmx_ctrl #(.M(M)) dut (.clk, .rst_n, .start, .cp1_in, .cp2_in, .hit, .state,
                         .cp1, .cp2, .k, .ct, .cb, .top_we, .bot_we, .cmp_cur,
                         .cur_load, .dest_we, .phase2, .busy, .done);

  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s (cp1=%0d cp2=%0d)", what, cp1_in, cp2_in);
    end
  endtask

  int n_extra_hits, n_cmp1_hits, n_cmp2_streak, cycles, copy_cycles;
  int writes_k [$], writes_p [$], top_w [$], bot_w [$];
  int n_cur_load, exp_cur_load;

  task automatic run(input int c1, input int c2);
    int exp_k [$];
    int nout, exp_cycles;
    cp1_in = AW'(c1); cp2_in = AW'(c2);
    writes_k.delete(); writes_p.delete(); top_w.delete(); bot_w.delete();
    n_extra_hits = 0; n_cmp1_hits = 0; cycles = 0; copy_cycles = 0;
    n_cur_load = 0; exp_cur_load = 0;
    @(negedge clk); start = 1'b1;
    @(negedge clk); start = 1'b0;
    while (!done) begin
      // Decide the comparator result for this cycle.
      if (state inside {ST_CMP1_TOP_1, ST_CMP1_BTM_1, ST_CMP1_TOP_2, ST_CMP1_BTM_2}) begin
        hit = 1'($urandom_range(1, 0));
        n_cmp2_streak = 0;
        exp_cur_load++;
        if (hit) n_cmp1_hits++;
      end else if (cmp_cur) begin
        hit = (n_cmp2_streak < 3) && ($urandom_range(2, 0) == 0);
        if (hit) begin n_extra_hits++; n_cmp2_streak++; exp_cur_load++; end
      end else hit = 1'b0;
      #1;
      check(cmp_cur == (state inside {ST_CMP2_TOP_1, ST_CMP2_BTM_1, ST_CMP2_TOP_2, ST_CMP2_BTM_2}),
            "cmp_cur only in CMP2");
      if (state == ST_COPY_SMPL) copy_cycles++;
      if (top_we) top_w.push_back(int'(ct));
      if (bot_we) bot_w.push_back(int'(cb));
      if (dest_we) begin writes_k.push_back(int'(k)); writes_p.push_back(int'(phase2)); end
      if (cur_load) n_cur_load++;
      check(busy, "busy while running");
      cycles++;
      @(negedge clk);
      if (cycles > 10 * int'(M) + 100) break;
    end
    cycles++;   // the Finish cycle
    @(negedge clk);
    check(!busy && state == ST_IDLE, "back to idle after Finish");
    // Expected copy writes.
    check(top_w.size() == c1, "top copy count");
    foreach (top_w[i]) check(top_w[i] == i, "top copy address");
    check(bot_w.size() == int'(M) - 1 - c2, "bottom copy count");
    foreach (bot_w[i]) check(bot_w[i] == c2 + 1 + i, "bottom copy address");
    check(copy_cycles == ((c1 > int'(M) - 1 - c2) ? c1 : int'(M) - 1 - c2), "copy cycles");
    // Expected child writes.
    for (int ph = 0; ph < 2; ph++) begin
      for (int i = 0; i < c1; i++) exp_k.push_back(i);
      for (int i = c2 + 1; i < int'(M); i++) exp_k.push_back(i);
    end
    nout = c1 + int'(M) - 1 - c2;
    check(writes_k.size() == 2 * nout, "number of child writes");
    foreach (writes_k[i]) begin
      check(writes_k[i] == exp_k[i], "child write position");
      check(writes_p[i] == (i >= nout), "child write phase");
    end
    check(n_cur_load == exp_cur_load, "gene register loads");
    exp_cycles = copy_cycles + 4 * nout + n_extra_hits + 2 + 1;
    check(cycles == exp_cycles, $sformatf("latency %0d expected %0d", cycles, exp_cycles));
  endtask

  initial begin
    int a, b;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    run(1, int'(M) - 2);
    run(1, 1);
    run(int'(M) - 2, int'(M) - 2);
    run(3, 5);
    for (int it = 0; it < 60; it++) begin
      a = $urandom_range(M - 2, 1); b = $urandom_range(M - 2, 1);
      run(a < b ? a : b, a < b ? b : a);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
