// lfsr32: 32-bit Galois linear-feedback shift register.
//
// Pseudo-random source of the genetic-algorithm engine (mutation and
// crossover decisions, tournament entrants, initial population). Each enabled
// clock shifts the state right by one and, when the bit shifted out is 1,
// XORs the feedback polynomial into it. The default polynomial
// x^32 + x^22 + x^2 + x + 1 gives the maximal period 2^32 - 1.
// `load` takes `seed` (a zero seed, which would lock the register, is replaced
// by 1) and has priority over `en`. Reset loads 1.
// Timing: `value` is the registered state, new value every enabled clock.
// The use of an LFSR follows the reference design; the polynomial, width and
// seeding are this implementation's choices.
module lfsr32 #(
  parameter logic [31:0] POLY = 32'h8020_0003
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        en,
  input  logic        load,
  input  logic [31:0] seed,
  output logic [31:0] value
);
  always_ff @(posedge clk) begin
    if (!rst_n)    value <= 32'd1;
    else if (load) value <= (seed == '0) ? 32'd1 : seed;
    else if (en)   value <= (value >> 1) ^ (value[0] ? POLY : 32'd0);
  end
endmodule
