// fsa_pkg: types shared by the feedback shift-add (FSA) powering unit.
//
// state_t lists the six controller states. Load is the reset state and
// takes the operands; Init performs the first step (index 1) of conversion,
// accumulation and deconversion in one clock; each later index i = 3..K-1
// passes through Loop_DLG (discrete-log conversion step), Loop_ACC
// (accumulation of e*y) and Loop_EXP (deconversion step), one clock each;
// Ready presents the result for one clock and returns to Load. The state
// names follow the published controller; the binary encoding is a free
// choice of this design.
package fsa_pkg;

  typedef enum logic [2:0] {
    ST_LOAD     = 3'd0,
    ST_INIT     = 3'd1,
    ST_LOOP_DLG = 3'd2,
    ST_LOOP_ACC = 3'd3,
    ST_LOOP_EXP = 3'd4,
    ST_READY    = 3'd5
  } state_t;

endpackage
