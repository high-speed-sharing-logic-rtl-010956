// bist_pkg: types and constants shared by the logic-BIST blocks.
//
// cube_t encodes one entry c(j) of the primary input cube: the value that
// primary input j should see more often during test generation. CUBE_X means
// no preference (the input is driven straight from one LFSR bit), CUBE_0 puts a
// mod-input AND gate on the input, CUBE_1 a mod-input OR gate. The 2-bit
// encoding is a choice of this design.
//
// ctrl_state_t is the state of the BIST control unit (see bist_ctrl).
package bist_pkg;

  typedef enum logic [1:0] {
    CUBE_X = 2'd0,
    CUBE_0 = 2'd1,
    CUBE_1 = 2'd2
  } cube_t;

  typedef enum logic [2:0] {
    ST_IDLE  = 3'd0,
    ST_LOAD  = 3'd1,
    ST_RUN   = 3'd2,
    ST_CHECK = 3'd3,
    ST_DONE  = 3'd4
  } ctrl_state_t;

  // Phase of the low-power LFSR: which vector the next enabled clock produces.
  typedef enum logic [1:0] {
    PH_T  = 2'd0,  // shift the first half (plus the shaded flop): T1, T2, ...
    PH_TA = 2'd1,  // hold, inject the second half
    PH_TB = 2'd2,  // shift the second half
    PH_TC = 2'd3   // hold, inject the first half
  } lp_phase_t;

endpackage
