// lfsr: pseudo-random number source for the weighted selections.
//
// A Galois linear feedback shift register of WIDTH bits. Each step shifts the
// register right by one; when the bit shifted out is 1 the feedback mask POLY
// is XORed in. The register advances STEPS steps per clock, so successive
// values read from it share no bits when STEPS is at least the number of bits
// a consumer uses. The default polynomial x^32 + x^22 + x^2 + x + 1 is
// maximal-length (period 2^32 - 1). SEED must be non-zero; an all-zero seed
// is replaced by 1 because the all-zero state is a fixed point.
//
// Using an LFSR as the hardware random source follows the generator's design;
// width, polynomial, steps per clock and seeding are this design's choices.
//
// Interface: clk, rst_n (asynchronous, active low, loads SEED), value (the
// current register contents, changes on every rising edge).
module lfsr #(
  parameter int unsigned       WIDTH = 32,
  parameter logic [WIDTH-1:0]  POLY  = 32'h8020_0003,
  parameter int unsigned       STEPS = 16,
  parameter logic [WIDTH-1:0]  SEED  = 32'h1234_5678
) (
  input  logic             clk,
  input  logic             rst_n,
  output logic [WIDTH-1:0] value
);

  localparam logic [WIDTH-1:0] SEED_NZ = (SEED == '0) ? WIDTH'(1) : SEED;

  logic [WIDTH-1:0] state_q, state_d;

  always_comb begin
    state_d = state_q;
    for (int unsigned s = 0; s < STEPS; s++) begin
      if (state_d[0]) state_d = (state_d >> 1) ^ POLY;
      else            state_d = state_d >> 1;
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) state_q <= SEED_NZ;
    else        state_q <= state_d;
  end

  assign value = state_q;

endmodule
