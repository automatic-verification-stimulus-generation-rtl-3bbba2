// word_bias_adjust: folds a word-level bias on a constrained signal into the
// transition weights.
//
// When a signal s is set by the update function of a transition, biasing its
// values can only act through the choice of transition. For N transitions,
// an NBITS-bit signal with word weights W_i and a feasibility bit C^t_i (1 if
// s = i can result from taking t), the modified weight is
//     w'_t = w_t * (sum_i C^t_i * W_i) / (sum_i W_i).
// A transition that forces s to a value is scaled by that value's share of
// the word weights; one that leaves s free keeps its weight. The division
// truncates toward zero; if all word weights are 0 the weights pass
// unchanged. Both are this design's choices.
//
// Purely combinational. With constant inputs, as in the generator, it reduces
// to constants at synthesis.
module word_bias_adjust #(
  parameter int unsigned N     = 5,
  parameter int unsigned NBITS = 1,
  parameter int unsigned WW    = 8,
  localparam int unsigned NV   = 2**NBITS
) (
  input  logic [WW-1:0] w        [N],
  input  logic [NV-1:0] feasible [N],
  input  logic [WW-1:0] word_w   [NV],
  output logic [WW-1:0] w_mod    [N]
);

  localparam int unsigned SUMW = WW + NBITS;   // width of a sum of word weights
  localparam int unsigned PW   = WW + SUMW;    // width of w_t times such a sum

  logic [SUMW-1:0] word_sum;

  always_comb begin
    word_sum = '0;
    for (int unsigned i = 0; i < NV; i++) word_sum = word_sum + SUMW'(word_w[i]);
  end

  always_comb begin
    for (int unsigned t = 0; t < N; t++) begin
      logic [SUMW-1:0] feas_sum;
      logic [PW-1:0]   prod;
      feas_sum = '0;
      for (int unsigned i = 0; i < NV; i++)
        if (feasible[t][i]) feas_sum = feas_sum + SUMW'(word_w[i]);
      prod = PW'(w[t]) * PW'(feas_sum);
      if (word_sum == '0) w_mod[t] = w[t];
      else                w_mod[t] = WW'(prod / PW'(word_sum));
    end
  end

endmodule
