// nefsm_eval: Evaluation phase of the burst-master generator.
//
// For the current state it evaluates the enabling function of every outgoing
// transition on the present interface values and the burst counter V_b:
//   t1: I_r & !I_e & (V_b != 0)     t2: !I_r & !I_e
//   t3: I_r & !I_e & (V_b == 0)     t4: I_r & !I_e & (V_b != 0)
//   t5: !I_r & I_e
// All five leave state SEQ. The enabled set is the next-transition candidate
// set. fail is the NOR of the enabling results: the slave drove a combination
// (I_r and I_e together) after which no legal move exists, which is a
// protocol violation by the design under verification.
//
// DONE, BUSY and ERROR have no outgoing transitions in this partial model of
// the protocol. In those states the candidate set is empty by construction;
// terminal is raised and fail is held at 0, since no rule can be broken there
// (this design's choice).
//
// Purely combinational.
module nefsm_eval
  import avsg_pkg::*;
#(
  parameter int unsigned VB_W = 5
) (
  input  state_e          state,
  input  logic            i_r,
  input  logic            i_e,
  input  logic [VB_W-1:0] v_b,
  output tmask_t          ntcs,
  output logic            fail,
  output logic            terminal
);

  logic has_beats;
  assign has_beats = (v_b != '0);

  always_comb begin
    ntcs = '0;
    if (state == S_SEQ) begin
      ntcs[T1] =  i_r && !i_e &&  has_beats;
      ntcs[T2] = !i_r && !i_e;
      ntcs[T3] =  i_r && !i_e && !has_beats;
      ntcs[T4] =  i_r && !i_e &&  has_beats;
      ntcs[T5] = !i_r &&  i_e;
    end
  end

  assign terminal = (state != S_SEQ);
  assign fail     = !terminal && !(|ntcs);

endmodule
