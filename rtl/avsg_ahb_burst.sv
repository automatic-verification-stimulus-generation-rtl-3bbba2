// avsg_ahb_burst: constrained-random stimulus generator and protocol checker
// for a bus slave, built from the non-deterministic extended FSM (NEFSM) of a
// simplified AMBA AHB fixed-length incrementing burst master.
//
// It plays the master. Every clock it runs three phases on the slave's
// present response (I_r ready, I_e error), its own registered outputs and
// the burst counter V_b:
//   Evaluation (nefsm_eval): which outgoing transitions of the current state
//     are enabled. None enabled means the slave broke the protocol: fail = 1.
//   Selection (weighted_select + lfsr): one enabled transition is drawn at
//     random with probability proportional to its weight.
//   Update (nefsm_update + word_bias_gen): the drawn transition's update
//     function sets the constrained outputs; the others get biased random
//     values. State, outputs and V_b are registered at the rising edge.
// Only legal stimulus can therefore appear on O_b/O_a/O_d, whatever the
// slave does, and the slave's legality is checked on the way.
//
// Biasing. T_WEIGHT are the transition weights, D_WEIGHT the word weights of
// O_d, B_WEIGHT those of O_b. Because O_b is also set by transitions, its word
// bias is folded into the transition weights (word_bias_adjust) with the
// feasibility table avsg_pkg::B_FEASIBLE; with the defaults the effective
// weights of t1..t5 are 60/40/40/5/75. All defaults are the method's worked
// example. They are parameters because the biasing is fixed when the
// generator is built.
//
// Interface and timing.
//   clk, rst_n   rising edge; asynchronous active-low reset to state SEQ with
//                V_b = INIT_LEN, O_a = INIT_ADDR, O_b = 0, O_d = 0.
//   start        synchronous: reload SEQ with V_b = start_len,
//                O_a = start_addr, O_b = 0, O_d = 0 (starts a new burst);
//                overrides the transition of that cycle.
//   i_r, i_e     the slave's response, sampled at the rising edge.
//   o_b,o_a,o_d  registered stimulus.
//   fail         combinational: the present i_r/i_e leave no legal move. The
//                generator then holds all state until the slave changes.
//   state, v_b   present NEFSM state and burst counter.
//   terminal     the state has no outgoing transitions (DONE, BUSY, ERROR,
//                where the partial protocol model ends); the generator holds
//                until start.
//   trans, trans_valid  the transition taken at the last rising edge.
// The reset values, the start/reload port, holding in terminal states and all
// widths (ADDR_W, VB_W) are this design's choices; the protocol model, the
// three phases and the biasing arithmetic follow the method.
module avsg_ahb_burst
  import avsg_pkg::*;
#(
  parameter int unsigned ADDR_W    = 32,
  parameter int unsigned VB_W      = 5,
  parameter int unsigned RW        = 16,
  parameter logic [VB_W-1:0]   INIT_LEN  = 4,
  parameter logic [ADDR_W-1:0] INIT_ADDR = 20,
  parameter weight_t T_WEIGHT [NUM_T] = T_WEIGHT_DEFAULT,
  parameter weight_t D_WEIGHT [4]     = D_WEIGHT_DEFAULT,
  parameter weight_t B_WEIGHT [2]     = B_WEIGHT_DEFAULT,
  parameter logic [31:0] SEED_SEL  = 32'h1234_5678,
  parameter logic [31:0] SEED_D    = 32'h0BAD_F00D,
  parameter logic [31:0] SEED_B    = 32'h5EED_0B0B,
  parameter logic [31:0] SEED_A    = 32'hC0FF_EE01
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              start,
  input  logic [VB_W-1:0]   start_len,
  input  logic [ADDR_W-1:0] start_addr,
  input  logic              i_r,
  input  logic              i_e,
  output logic              o_b,
  output logic [ADDR_W-1:0] o_a,
  output logic [1:0]        o_d,
  output logic              fail,
  output state_e            state,
  output logic [VB_W-1:0]   v_b,
  output logic              terminal,
  output trans_e            trans,
  output logic              trans_valid
);

  if (ADDR_W > 32) begin : g_addr_check
    $error("avsg_ahb_burst: ADDR_W above 32 is not supported");
  end

  // ---------------------------------------------------------------- state
  state_e            state_q, state_n;
  logic              o_b_q, o_b_n;
  logic [ADDR_W-1:0] o_a_q, o_a_n;
  logic [1:0]        o_d_q, o_d_n;
  logic [VB_W-1:0]   v_b_q, v_b_n;
  trans_e            trans_q;
  logic              trans_valid_q;

  // ---------------------------------------------------------- evaluation
  tmask_t ntcs;

  nefsm_eval #(.VB_W(VB_W)) u_eval (
    .state    (state_q),
    .i_r      (i_r),
    .i_e      (i_e),
    .v_b      (v_b_q),
    .ntcs     (ntcs),
    .fail     (fail),
    .terminal (terminal)
  );

  // ----------------------------------------------------------- selection
  weight_t w_mod [NUM_T];

  word_bias_adjust #(.N(NUM_T), .NBITS(1), .WW(WEIGHT_W)) u_adjust (
    .w        (T_WEIGHT),
    .feasible (B_FEASIBLE),
    .word_w   (B_WEIGHT),
    .w_mod    (w_mod)
  );

  logic [31:0]                     sel_rnd;
  logic                            sel_valid;
  logic [$clog2(NUM_T)-1:0]        sel_idx;
  tmask_t                          sel_onehot;
  logic [WEIGHT_W+$clog2(NUM_T)-1:0] sel_total;

  lfsr #(.WIDTH(32), .POLY(32'h8020_0003), .STEPS(RW), .SEED(SEED_SEL)) u_sel_rng (
    .clk   (clk),
    .rst_n (rst_n),
    .value (sel_rnd)
  );

  weighted_select #(.N(NUM_T), .WW(WEIGHT_W), .RW(RW)) u_select (
    .weight (w_mod),
    .enable (ntcs),
    .rnd    (sel_rnd[RW-1:0]),
    .valid  (sel_valid),
    .sel    (sel_idx),
    .onehot (sel_onehot),
    .total  (sel_total)
  );

  // -------------------------------------------------------------- update
  logic        rnd_b;
  logic [1:0]  rnd_d;
  logic        rnd_b_valid, rnd_d_valid;
  logic [31:0] rnd_a;

  word_bias_gen #(.NBITS(2), .WW(WEIGHT_W), .RW(RW), .SEED(SEED_D)) u_gen_d (
    .clk    (clk),
    .rst_n  (rst_n),
    .weight (D_WEIGHT),
    .value  (rnd_d),
    .valid  (rnd_d_valid)
  );

  word_bias_gen #(.NBITS(1), .WW(WEIGHT_W), .RW(RW), .SEED(SEED_B)) u_gen_b (
    .clk    (clk),
    .rst_n  (rst_n),
    .weight (B_WEIGHT),
    .value  (rnd_b),
    .valid  (rnd_b_valid)
  );

  lfsr #(.WIDTH(32), .POLY(32'h8020_0003), .STEPS(32), .SEED(SEED_A)) u_addr_rng (
    .clk   (clk),
    .rst_n (rst_n),
    .value (rnd_a)
  );

  nefsm_update #(.ADDR_W(ADDR_W), .VB_W(VB_W)) u_update (
    .sel       (trans_e'(sel_idx)),
    .sel_valid (sel_valid),
    .state     (state_q),
    .o_b       (o_b_q),
    .o_a       (o_a_q),
    .o_d       (o_d_q),
    .v_b       (v_b_q),
    .rnd_b     (rnd_b),
    .rnd_d     (rnd_d),
    .rnd_a     (rnd_a[ADDR_W-1:0]),
    .state_n   (state_n),
    .o_b_n     (o_b_n),
    .o_a_n     (o_a_n),
    .o_d_n     (o_d_n),
    .v_b_n     (v_b_n)
  );

  // ----------------------------------------------------------- registers
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state_q       <= S_SEQ;
      o_b_q         <= 1'b0;
      o_a_q         <= INIT_ADDR;
      o_d_q         <= 2'b00;
      v_b_q         <= INIT_LEN;
      trans_q       <= T1;
      trans_valid_q <= 1'b0;
    end else if (start) begin
      state_q       <= S_SEQ;
      o_b_q         <= 1'b0;
      o_a_q         <= start_addr;
      o_d_q         <= 2'b00;
      v_b_q         <= start_len;
      trans_valid_q <= 1'b0;
    end else begin
      state_q       <= state_n;
      o_b_q         <= o_b_n;
      o_a_q         <= o_a_n;
      o_d_q         <= o_d_n;
      v_b_q         <= v_b_n;
      trans_q       <= trans_e'(sel_idx);
      trans_valid_q <= sel_valid;
    end
  end

  assign o_b         = o_b_q;
  assign o_a         = o_a_q;
  assign o_d         = o_d_q;
  assign state       = state_q;
  assign v_b         = v_b_q;
  assign trans       = trans_q;
  assign trans_valid = trans_valid_q;

  // ---------------------------------------------------------- assertions
  // The drawn transition is always one of the enabled candidates.
  a_sel_in_ntcs: assert property (@(posedge clk) disable iff (!rst_n)
    sel_valid |-> ntcs[sel_idx]);
  // A protocol violation leaves no candidate to draw.
  a_fail_no_move: assert property (@(posedge clk) disable iff (!rst_n)
    fail |-> !sel_valid);
  // In SEQ, the slave must not signal ready and error together.
  a_rdy_err_fail: assert property (@(posedge clk) disable iff (!rst_n)
    (state_q == S_SEQ && i_r && i_e) |-> fail);

endmodule
