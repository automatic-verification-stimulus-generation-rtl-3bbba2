// word_bias_gen: random generator for an n-bit signal with word-level biasing.
//
// Every clock it offers a new value v of NBITS bits, drawn with probability
// weight[v] / (sum of all weights). This is how the generator fills an output
// that the selected transition leaves unconstrained. Unlike per-bit biasing,
// any distribution over the 2^NBITS words can be set, including a weight of 0
// to never produce a value. It is a private lfsr feeding a weighted_select in
// which every word is a candidate.
//
// Interface: clk, rst_n (asynchronous, active low, reseeds the LFSR);
// weight[2^NBITS] word weights, may change at any time; value and valid are
// combinational from the registered LFSR state: a new draw after each rising
// edge. valid is 0 when all weights are 0, and value is then 0.
// SEED picks the LFSR starting point; give every instance its own.
// Drawing unconstrained outputs through the weighted selection follows the
// method; weights as ports (so one module serves any field) and one draw per
// clock are this design's choices.
module word_bias_gen #(
  parameter int unsigned NBITS = 2,
  parameter int unsigned WW    = 8,
  parameter int unsigned RW    = 16,
  parameter logic [31:0] SEED  = 32'h0BAD_F00D
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic [WW-1:0]    weight [2**NBITS],
  output logic [NBITS-1:0] value,
  output logic             valid
);

  localparam int unsigned NV = 2**NBITS;

  logic [31:0]             lfsr_value;
  logic [NV-1:0]           onehot;
  logic [NBITS+WW-1:0]     total;
  logic [NBITS-1:0]        sel;

  lfsr #(.WIDTH(32), .POLY(32'h8020_0003), .STEPS(RW), .SEED(SEED)) u_lfsr (
    .clk   (clk),
    .rst_n (rst_n),
    .value (lfsr_value)
  );

  weighted_select #(.N(NV), .WW(WW), .RW(RW)) u_sel (
    .weight (weight),
    .enable ({NV{1'b1}}),
    .rnd    (lfsr_value[RW-1:0]),
    .valid  (valid),
    .sel    (sel),
    .onehot (onehot),
    .total  (total)
  );

  assign value = sel;

endmodule
