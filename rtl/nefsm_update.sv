// nefsm_update: Update phase of the burst-master generator.
//
// Given the transition chosen in the Selection phase it produces the next
// state and the next values of the outputs O_b, O_a, O_d and of the burst
// counter V_b. Values named by the transition's update function are
// constrained; every other output takes a fresh random value from the
// biased generators (rnd_b, rnd_d: word-level biased; rnd_a: uniform).
//
//   t1 -> SEQ  : V_b-1, O_a+1, O_b=0;          O_d random
//   t2 -> SEQ  : O_b, O_a, O_d held (wait state); V_b held
//   t3 -> DONE : no constraint;                 O_b, O_a, O_d random
//   t4 -> BUSY : V_b-1, O_a+1, O_b=1;          O_d random
//   t5 -> ERROR: O_b=0, O_d held;               O_a random
// The update functions are those of the protocol model. That an internal
// variable a transition does not name keeps its value (only outputs are
// randomised) is this design's reading.
// When sel_valid is 0 (no transition can be taken) everything holds.
//
// Purely combinational.
module nefsm_update
  import avsg_pkg::*;
#(
  parameter int unsigned ADDR_W = 32,
  parameter int unsigned VB_W   = 5
) (
  input  trans_e            sel,
  input  logic              sel_valid,
  input  state_e            state,
  input  logic              o_b,
  input  logic [ADDR_W-1:0] o_a,
  input  logic [1:0]        o_d,
  input  logic [VB_W-1:0]   v_b,
  input  logic              rnd_b,
  input  logic [1:0]        rnd_d,
  input  logic [ADDR_W-1:0] rnd_a,
  output state_e            state_n,
  output logic              o_b_n,
  output logic [ADDR_W-1:0] o_a_n,
  output logic [1:0]        o_d_n,
  output logic [VB_W-1:0]   v_b_n
);

  always_comb begin
    state_n = state;
    o_b_n   = o_b;
    o_a_n   = o_a;
    o_d_n   = o_d;
    v_b_n   = v_b;
    if (sel_valid) begin
      unique case (sel)
        T1: begin
          state_n = S_SEQ;
          v_b_n   = v_b - VB_W'(1);
          o_a_n   = o_a + ADDR_W'(1);
          o_b_n   = 1'b0;
          o_d_n   = rnd_d;
        end
        T2: begin
          state_n = S_SEQ;
        end
        T3: begin
          state_n = S_DONE;
          o_b_n   = rnd_b;
          o_a_n   = rnd_a;
          o_d_n   = rnd_d;
        end
        T4: begin
          state_n = S_BUSY;
          v_b_n   = v_b - VB_W'(1);
          o_a_n   = o_a + ADDR_W'(1);
          o_b_n   = 1'b1;
          o_d_n   = rnd_d;
        end
        T5: begin
          state_n = S_ERROR;
          o_b_n   = 1'b0;
          o_a_n   = rnd_a;
        end
        default: ;
      endcase
    end
  end

endmodule
