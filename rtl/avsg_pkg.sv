// avsg_pkg: types and constants shared by the stimulus generator built from
// the non-deterministic extended FSM (NEFSM) of a simplified AMBA AHB
// fixed-length incrementing burst master.
//
// The model has four states (SEQ, DONE, BUSY, ERROR), five transitions
// t1..t5 and one internal variable V_b that counts the beats left in the
// burst. Inputs from the slave are I_r (ready) and I_e (error); outputs to the
// slave are O_b (busy), O_a (address) and O_d (data).
//
// The default biasing numbers are the worked example of the method: base
// transition weights 80/40/40/20/100, data word weights 5/40/40/15 and busy
// word weights 3/1. Weight width, the transition encoding and the feasibility
// table of O_b per transition are this implementation's choices, derived from
// the update functions of the five transitions.
package avsg_pkg;

  // Weights are unsigned integers of this width.
  localparam int unsigned WEIGHT_W = 8;
  typedef logic [WEIGHT_W-1:0] weight_t;

  // Number of transitions of the burst NEFSM.
  localparam int unsigned NUM_T = 5;
  typedef logic [NUM_T-1:0] tmask_t;

  // Index of a transition: T1 is bit 0 of a tmask_t, T5 is bit 4.
  typedef enum logic [2:0] {
    T1 = 3'd0,  // SEQ -> SEQ  : ready, no error, beats left: next beat, O_b = 0
    T2 = 3'd1,  // SEQ -> SEQ  : not ready, no error: wait, hold O_b, O_a, O_d
    T3 = 3'd2,  // SEQ -> DONE : ready, no error, no beats left
    T4 = 3'd3,  // SEQ -> BUSY : ready, no error, beats left: next beat, O_b = 1
    T5 = 3'd4   // SEQ -> ERROR: not ready, error: O_b = 0, hold O_d
  } trans_e;

  typedef enum logic [1:0] {
    S_SEQ   = 2'd0,
    S_DONE  = 2'd1,
    S_BUSY  = 2'd2,
    S_ERROR = 2'd3
  } state_e;

  // Base transition weights (transition-level biasing), t1..t5.
  localparam weight_t T_WEIGHT_DEFAULT [NUM_T] = '{8'd80, 8'd40, 8'd40, 8'd20, 8'd100};

  // Word-level weights of the 2-bit data output O_d, for values 0..3.
  localparam weight_t D_WEIGHT_DEFAULT [4] = '{8'd5, 8'd40, 8'd40, 8'd15};

  // Word-level weights of the 1-bit busy output O_b, for values 0..1.
  localparam weight_t B_WEIGHT_DEFAULT [2] = '{8'd3, 8'd1};

  // Feasibility C^t_{b=i} of O_b = i when transition t is taken, bit i of
  // each entry. t1 and t5 force O_b = 0, t4 forces O_b = 1, t2 holds the old
  // value (either is possible) and t3 leaves O_b unconstrained.
  localparam logic [1:0] B_FEASIBLE [NUM_T] = '{2'b01, 2'b11, 2'b11, 2'b10, 2'b01};

endpackage
