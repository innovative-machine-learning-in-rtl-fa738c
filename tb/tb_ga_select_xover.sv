// tb_ga_select_xover: two binary tournaments and single-point crossover.
// Random candidates, fitness values (with forced ties) and random numbers are
// compared against a reference: parent A is the fitter of entrants 0/1,
// parent B of 2/3 (ties go to the first); when rnd[7:0] < xover_prob the
// child takes bits [point-1:0] from B and the rest from A, with point =
// rnd[11:8] + 1 limited to CW - 1; otherwise the child is A. Also checks
// that both crossover outcomes occurred.
module tb_ga_select_xover;
  timeunit 1ns; timeprecision 1ps;
  localparam int CW = 16;
  logic [CW-1:0] cand_chrom [4], child;
  logic [31:0] cand_fit [4];
  logic [7:0] xover_prob;
  logic [11:0] rnd;
  int checks = 0, failures = 0, nx = 0, nnx = 0;
  ga_select_xover dut (.*);
  initial begin
    #1ms;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    for (int i = 0; i < 5000; i++) begin
      logic [CW-1:0] a, b, e;
      int pt;
      for (int c = 0; c < 4; c++) begin cand_chrom[c] = $urandom; cand_fit[c] = $urandom; end
      if (i % 5 == 0) cand_fit[1] = cand_fit[0];
      if (i % 7 == 0) cand_fit[3] = cand_fit[2];
      xover_prob = $urandom; rnd = $urandom;
      #1;
      a = (cand_fit[1] > cand_fit[0]) ? cand_chrom[1] : cand_chrom[0];
      b = (cand_fit[3] > cand_fit[2]) ? cand_chrom[3] : cand_chrom[2];
      pt = rnd[11:8] + 1; if (pt > CW - 1) pt = CW - 1;
      if (rnd[7:0] < xover_prob) begin
        nx++;
        for (int j = 0; j < CW; j++) e[j] = (j < pt) ? b[j] : a[j];
      end else begin
        nnx++; e = a;
      end
      checks++;
      if (child !== e) begin failures++; $display("child %h exp %h", child, e); end
    end
    checks++;
    if (nx == 0 || nnx == 0) begin failures++; $display("crossover cases not covered"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
