// ga_select_xover: tournament selection and crossover of the genetic algorithm.
//
// Purely combinational. Two binary tournaments: parent A is the fitter of
// entrants 0 and 1, parent B the fitter of entrants 2 and 3 (a tie goes to the
// lower-numbered entrant). With probability xover_prob/256, decided by
// rnd[7:0] < xover_prob, the child takes bits [p-1:0] from B and the rest from
// A, where the crossover point p = rnd[11:8] + 1 (1..CW-1 for CW = 16, built
// as a mask and a multiplexer); otherwise the child is a copy of A.
// Comparator tournaments and bit-level crossover follow the reference design;
// the tournament size of two and single-point crossover are this
// implementation's choices.
module ga_select_xover #(
  parameter int unsigned CW = 16
) (
  input  logic [CW-1:0] cand_chrom [4],
  input  logic [31:0]   cand_fit   [4],
  input  logic [7:0]    xover_prob,
  input  logic [11:0]   rnd,
  output logic [CW-1:0] child
);
  logic [CW-1:0] pa, pb, mask;
  logic [4:0]    point;

  always_comb begin
    pa    = (cand_fit[1] > cand_fit[0]) ? cand_chrom[1] : cand_chrom[0];
    pb    = (cand_fit[3] > cand_fit[2]) ? cand_chrom[3] : cand_chrom[2];
    point = {1'b0, rnd[11:8]} + 5'd1;
    if (point >= 5'(CW)) point = 5'(CW - 1);
    mask  = CW'((33'd1 << point) - 33'd1);
    child = (rnd[7:0] < xover_prob) ? ((pb & mask) | (pa & ~mask)) : pa;
  end
endmodule
