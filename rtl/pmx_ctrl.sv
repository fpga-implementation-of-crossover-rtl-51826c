// pmx_ctrl: state machine and loop counters of the PMX crossover.
//
// The crossover has two cut points, cp1 <= cp2. Positions 0..cp1-1 are the
// top part, cp1..cp2 the mapping segment and cp2+1..M-1 the bottom part.
// Child 1 is built inside the parent-2 memory and child 2 inside the parent-1
// memory, so the controller runs these steps:
//
//   COPY_SMPL        copy parent 2's top and bottom parts into the temporary
//                    memory, one word of each per cycle, in parallel
//   *_TOP_1, *_BTM_1 fill child 1's top and bottom from parent 1
//   *_TOP_2, *_BTM_2 fill child 2's top and bottom from the saved copy
//   Finish           signal completion for one cycle, then back to Idle
//
// Each part is filled one position k at a time by three states:
//   CMP1   compare the source gene at k with the other parent's segment;
//          a match (a repeated city) goes to CMP2, no match goes to COUNT
//   CMP2   compare the mapped gene; stay while it still matches, otherwise
//          write it and go on with the next k (or the next part)
//   COUNT  write the gene and go on with the next k (or the next part)
// The numbers used in comments are the transition conditions of the
// paper's condition table: 1/6 temporary memory not full/full, 2/3 match
// found/not found in the segment, 4/5 counter k at/below its last value.
// Delay1 and Delay2 sit between a top part and the following bottom part;
// here they spend one cycle moving k to the first bottom position.
//
// Three counters: k (position being filled) and ct/cb (top and bottom copy
// positions in COPY_SMPL).
//
// Interface: `start` (sampled in Idle) latches cp1/cp2, which must satisfy
// 1 <= cp1 <= cp2 <= M-2 so that every part holds at least one city (this
// design's restriction). `hit` comes from the comparators in the same cycle.
// Outputs tell the datapath what to do this cycle: `cmp_cur` selects the
// registered mapped gene (CMP2) instead of the source gene (CMP1) as the
// comparator key, `cur_load` loads the gene register, `dest_we` writes the
// gene register to position k of the child, `phase2` selects child 2's
// memories. `done` is high for the one cycle spent in Finish.
// Latency: max(cp1, M-1-cp2) copy cycles, then for each of the 2*(M-(cp2-cp1+1))
// filled positions two cycles plus one per mapping step, plus two Delay
// cycles and the Finish cycle.
module pmx_ctrl
  import pmx_pkg::*;
#(
  parameter int unsigned M  = 1024,
  parameter int unsigned AW = $clog2(M)
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          start,
  input  logic [AW-1:0] cp1_in,
  input  logic [AW-1:0] cp2_in,
  input  logic          hit,
  output pmx_state_e    state,
  output logic [AW-1:0] cp1,
  output logic [AW-1:0] cp2,
  output logic [AW-1:0] k,
  output logic [AW-1:0] ct,
  output logic [AW-1:0] cb,
  output logic          top_we,
  output logic          bot_we,
  output logic          cmp_cur,
  output logic          cur_load,
  output logic          dest_we,
  output logic          phase2,
  output logic          busy,
  output logic          done
);

  localparam logic [AW-1:0] LAST = AW'(M - 1);

  pmx_state_e    state_n;
  logic [AW-1:0] k_n, ct_n, cb_n, cp1_n, cp2_n;
  logic          ct_run, cb_run;     // copy counters still have words to copy
  logic          ct_run_n, cb_run_n;
  logic          k_last;             // condition 4 (else 5)
  logic          is_top, is_cmp1, is_cmp2, is_count;

  // Decode the current state into the role it plays.
  always_comb begin
    is_cmp1  = state inside {ST_CMP1_TOP_1, ST_CMP1_BTM_1, ST_CMP1_TOP_2, ST_CMP1_BTM_2};
    is_cmp2  = state inside {ST_CMP2_TOP_1, ST_CMP2_BTM_1, ST_CMP2_TOP_2, ST_CMP2_BTM_2};
    is_count = state inside {ST_COUNT_TOP_1, ST_COUNT_BTM_1, ST_COUNT_TOP_2, ST_COUNT_BTM_2};
    is_top   = state inside {ST_CMP1_TOP_1, ST_CMP2_TOP_1, ST_COUNT_TOP_1,
                             ST_CMP1_TOP_2, ST_CMP2_TOP_2, ST_COUNT_TOP_2};
    phase2   = state inside {ST_CMP1_TOP_2, ST_CMP2_TOP_2, ST_COUNT_TOP_2, ST_DELAY2,
                             ST_CMP1_BTM_2, ST_CMP2_BTM_2, ST_COUNT_BTM_2};
    k_last   = is_top ? (k == cp1 - 1'b1) : (k == LAST);
  end

  assign cmp_cur  = is_cmp2;
  assign cur_load = is_cmp1 || (is_cmp2 && hit);
  assign dest_we  = is_count || (is_cmp2 && !hit);
  assign top_we   = (state == ST_COPY_SMPL) && ct_run;
  assign bot_we   = (state == ST_COPY_SMPL) && cb_run;
  assign busy     = (state != ST_IDLE);
  assign done     = (state == ST_FINISH);

  // Next state and counter updates.
  always_comb begin
    state_n  = state;
    k_n      = k;
    ct_n     = ct;
    cb_n     = cb;
    ct_run_n = ct_run;
    cb_run_n = cb_run;
    cp1_n    = cp1;
    cp2_n    = cp2;

    unique case (state)
      ST_IDLE: begin
        if (start) begin
          state_n  = ST_COPY_SMPL;
          cp1_n    = cp1_in;
          cp2_n    = cp2_in;
          ct_n     = '0;
          cb_n     = cp2_in + 1'b1;
          ct_run_n = 1'b1;
          cb_run_n = 1'b1;
        end
      end

      ST_COPY_SMPL: begin
        // One word of each part per cycle; a finished counter holds.
        if (ct_run) begin
          if (ct == cp1 - 1'b1) ct_run_n = 1'b0;
          else                  ct_n     = ct + 1'b1;
        end
        if (cb_run) begin
          if (cb == LAST) cb_run_n = 1'b0;
          else            cb_n     = cb + 1'b1;
        end
        if (!ct_run_n && !cb_run_n) begin       // condition 6
          state_n = ST_CMP1_TOP_1;
          k_n     = '0;
        end                                     // else condition 1: stay
      end

      ST_DELAY1: begin
        state_n = ST_CMP1_BTM_1;
        k_n     = cp2 + 1'b1;
      end

      ST_DELAY2: begin
        state_n = ST_CMP1_BTM_2;
        k_n     = cp2 + 1'b1;
      end

      ST_FINISH: state_n = ST_IDLE;

      default: begin
        // The twelve CMP1/CMP2/COUNT states share one pattern.
        if (is_cmp1) begin
          state_n = pmx_state_e'(hit ? state + 5'd1 : state + 5'd2);   // 2 / 3
        end else if (is_cmp2 && hit) begin
          state_n = state;                                             // 2
        end else begin
          // COUNT, or CMP2 with no match: the gene is written this cycle.
          if (k_last) begin                                            // 4
            unique case (state)
              ST_CMP2_TOP_1, ST_COUNT_TOP_1: state_n = ST_DELAY1;
              ST_CMP2_BTM_1, ST_COUNT_BTM_1: begin
                state_n = ST_CMP1_TOP_2;
                k_n     = '0;
              end
              ST_CMP2_TOP_2, ST_COUNT_TOP_2: state_n = ST_DELAY2;
              default:                       state_n = ST_FINISH;
            endcase
          end else begin                                               // 5
            state_n = pmx_state_e'(is_cmp2 ? state - 5'd1 : state - 5'd2);
            k_n     = k + 1'b1;
          end
        end
      end
    endcase
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state  <= ST_IDLE;
      k      <= '0;
      ct     <= '0;
      cb     <= '0;
      ct_run <= 1'b0;
      cb_run <= 1'b0;
      cp1    <= '0;
      cp2    <= '0;
    end else begin
      state  <= state_n;
      k      <= k_n;
      ct     <= ct_n;
      cb     <= cb_n;
      ct_run <= ct_run_n;
      cb_run <= cb_run_n;
      cp1    <= cp1_n;
      cp2    <= cp2_n;
    end
  end

  // Checked whenever a start is accepted (state is Idle during reset too, so
  // start must be held low while rst_n is low).
  a_cut_points: assert property (@(posedge clk)
      (state == ST_IDLE && start) |->
        (cp1_in >= AW'(1) && cp1_in <= cp2_in && cp2_in <= AW'(M - 2)))
    else $error("pmx_ctrl: cut points %0d, %0d outside 1 <= cp1 <= cp2 <= M-2", cp1_in, cp2_in);

endmodule
