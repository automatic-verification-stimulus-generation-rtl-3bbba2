// weighted_select: picks one of N candidates at random, each enabled
// candidate i with probability weight[i] / (sum of enabled weights).
//
// The structure is the weighted selection procedure of the generator:
//   1. the weights of the enabled candidates (the rest count as 0) are summed
//      into running prefix sums P_i = w_0 + ... + w_i;
//   2. a raw random number rnd of RW bits is scaled into [0, P_{N-1}) as
//      r = (rnd * P_{N-1}) >> RW;
//   3. N comparators form lt_i = (r < P_i), a thermometer code;
//   4. a decoder selects the first i with lt_i set.
// Candidate i wins for exactly the r in [P_{i-1}, P_i), a range of w_i values,
// so a zero weight or a disabled candidate is never picked. The prefix sums
// are a ripple chain here (the method allows an adder tree or a look-up
// table); scaling by multiplication instead of a modulo is this design's
// choice. Its bias is below total/2^RW per value.
//
// Purely combinational. valid is 0 when no enabled candidate has a non-zero
// weight; sel and onehot are then 0.
module weighted_select #(
  parameter int unsigned N  = 5,
  parameter int unsigned WW = 8,
  parameter int unsigned RW = 16,
  localparam int unsigned IW = (N > 1) ? $clog2(N) : 1,
  localparam int unsigned SW = WW + IW
) (
  input  logic [WW-1:0] weight [N],
  input  logic [N-1:0]  enable,
  input  logic [RW-1:0] rnd,
  output logic          valid,
  output logic [IW-1:0] sel,
  output logic [N-1:0]  onehot,
  output logic [SW-1:0] total
);

  logic [SW-1:0]    prefix [N];
  logic [N-1:0]     lt;
  logic [SW+RW-1:0] product;
  logic [SW-1:0]    r;

  // Prefix sums of the enabled weights.
  always_comb begin
    logic [SW-1:0] acc;
    acc = '0;
    for (int unsigned i = 0; i < N; i++) begin
      acc       = acc + (enable[i] ? SW'(weight[i]) : SW'(0));
      prefix[i] = acc;
    end
  end

  assign total   = prefix[N-1];
  assign valid   = (total != '0);
  assign product = (SW+RW)'(rnd) * (SW+RW)'(total);
  assign r       = product[SW+RW-1:RW];

  // Comparators.
  always_comb begin
    for (int unsigned i = 0; i < N; i++) lt[i] = (r < prefix[i]);
  end

  // Decoder: first comparator that fires.
  always_comb begin
    onehot = '0;
    sel    = '0;
    for (int i = N - 1; i >= 0; i--) begin
      if (lt[i]) begin
        onehot = '0;
        onehot[i] = 1'b1;
        sel    = IW'(i);
      end
    end
  end

endmodule
