// ga_mutate: LFSR-driven mutation of the genetic algorithm.
//
// Purely combinational. With probability rate/256, decided by
// rnd[7:0] < rate, one bit of the child is inverted, at the position given by
// rnd[11:8] (modulo CW); otherwise the child passes unchanged. rate = 0
// disables mutation, rate = 255 mutates almost every child.
// Mutation from LFSR randomness follows the reference design; the one-bit
// flip per child is this implementation's choice.
module ga_mutate #(
  parameter int unsigned CW = 16
) (
  input  logic [CW-1:0] child_in,
  input  logic [7:0]    rate,
  input  logic [11:0]   rnd,
  output logic [CW-1:0] child_out
);
  logic [CW-1:0] flip;
  always_comb begin
    flip      = CW'(1) << (32'(rnd[11:8]) % CW);
    child_out = (rnd[7:0] < rate) ? (child_in ^ flip) : child_in;
  end
endmodule
