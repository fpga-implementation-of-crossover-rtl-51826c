// pmx_pkg: types shared by the PMX crossover modules.
//
// The controller states are the seventeen states named in the crossover
// state diagram: an idle state, the COPY_SMPL state that saves parts of
// parent 2, four groups of CMP1/CMP2/COUNT states (one group per part of a
// child that has to be filled), two one-cycle Delay states and Finish.
// The encoding is this design's own choice.
package pmx_pkg;

  typedef enum logic [4:0] {
    ST_IDLE,
    ST_COPY_SMPL,
    ST_CMP1_TOP_1, ST_CMP2_TOP_1, ST_COUNT_TOP_1,
    ST_DELAY1,
    ST_CMP1_BTM_1, ST_CMP2_BTM_1, ST_COUNT_BTM_1,
    ST_CMP1_TOP_2, ST_CMP2_TOP_2, ST_COUNT_TOP_2,
    ST_DELAY2,
    ST_CMP1_BTM_2, ST_CMP2_BTM_2, ST_COUNT_BTM_2,
    ST_FINISH
  } pmx_state_e;

  // Bits needed to store one city index of an M-city tour: ceil(log2 M) + 1.
  function automatic int unsigned gene_width(int unsigned m);
    return $clog2(m) + 1;
  endfunction

endpackage
