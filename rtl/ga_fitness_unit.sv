// ga_fitness_unit: parallel fitness evaluation of the genetic algorithm.
//
// Evaluates LANES individuals per clock, one multiplier (DSP slice) per lane.
// The fitness of chromosome c against the configured target t is
//   fit = (2^32 - 1) - (c - t)^2,
// so the closest individual has the largest fitness. Stage 1 registers the
// signed difference, stage 2 the squared distance subtracted from all-ones.
// Timing: `out_valid`/`fit` two clocks after `in_valid`, one set per clock.
// Parallel evaluation on DSP slices follows the reference design; the
// fitness function itself is this implementation's placeholder (a squared
// distance to a threshold set at run time), since the reference leaves it open.
module ga_fitness_unit #(
  parameter int unsigned LANES = 4,
  parameter int unsigned CW    = 16
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          in_valid,
  input  logic [CW-1:0] chrom [LANES],
  input  logic [CW-1:0] target,
  output logic          out_valid,
  output logic [31:0]   fit [LANES]
);
  logic signed [CW:0] diff [LANES];
  logic               v1;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      v1        <= 1'b0;
      out_valid <= 1'b0;
      for (int unsigned i = 0; i < LANES; i++) begin
        diff[i] <= '0;
        fit[i]  <= '0;
      end
    end else begin
      v1        <= in_valid;
      out_valid <= v1;
      for (int unsigned i = 0; i < LANES; i++) begin
        diff[i] <= $signed({1'b0, chrom[i]}) - $signed({1'b0, target});
        fit[i]  <= 32'hFFFF_FFFF - 32'(diff[i] * diff[i]);
      end
    end
  end
endmodule
