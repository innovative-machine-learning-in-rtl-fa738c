// tb_ga_engine: complete GA engine at its default size (32 x 16 bits, four
// fitness lanes). Three runs with different run-time settings (seed, target,
// mutation rate, crossover probability, generations) without reset between
// them. For each run it checks:
//   - `done` rises exactly (gens + 1) * (POP + POP/4 + 2) clocks after the edge that samples `start`, `busy` is high in between
//     and `gen` ends equal to the requested number of generations;
//   - `best_fit` equals 0xFFFFFFFF - (best_chrom - target)^2;
//   - the best fitness never decreases from one generation to the next
//     (elitism) and the number of evaluations equals gens + 1;
//   - the search gets within 2^8 of the target (a random start is
//     typically 2^14 away); the last run must reach the target exactly.
module tb_ga_engine;
  timeunit 1ns; timeprecision 1ps;
  localparam int POP = 32, CW = 16, NG = POP / 4;
  logic clk = 0, rst_n = 0, start = 0, busy, done;
  logic [7:0] cfg_mut_rate, cfg_xover_prob;
  logic [CW-1:0] cfg_target, best_chrom;
  logic [15:0] cfg_gens, gen;
  logic [31:0] cfg_seed, best_fit;
  int checks = 0, failures = 0;
  ga_engine dut (.*);
  always #5 clk = ~clk;
  function automatic logic [31:0] f(logic [CW-1:0] c, logic [CW-1:0] t);
    longint d = longint'(c) - longint'(t);
    return 32'(64'hFFFF_FFFF - d * d);
  endfunction
  initial begin
    #5ms;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  int cyc = 0, t_start, t_done, n_eval, decreases;
  logic [31:0] prev_best;
  logic was_eval = 0, done_d = 0;
  always @(posedge clk) begin
    cyc++;
    if (start && !busy) t_start = cyc;
    if (done && !done_d) t_done = cyc;
    done_d = done;
    // end of an evaluation: the EVAL state is left
    if (was_eval && dut.st != dut.S_EVAL) begin
      if (n_eval > 0 && best_fit < prev_best) decreases++;
      prev_best = best_fit; n_eval++;
    end
    was_eval = (dut.st == dut.S_EVAL);
  end
  task automatic run(int gens, logic [7:0] mr, logic [7:0] xp, logic [CW-1:0] tgt, bit exact);
    int gap;
    cfg_gens = gens; cfg_mut_rate = mr; cfg_xover_prob = xp; cfg_target = tgt; cfg_seed = $urandom;
    n_eval = 0; decreases = 0; t_done = -1;
    @(posedge clk); #1 start = 1; @(posedge clk); #1 start = 0;
    // busy from the clock after start until done
    checks++;
    if (!busy) begin failures++; $display("busy not raised"); end
    // change the inputs while running: they were sampled at start
    cfg_target = ~tgt; cfg_gens = 1;
    wait (done); @(posedge clk); @(negedge clk);   // let the monitor see it
    checks += 6;
    // seen one edge after it rises
    if (t_done - t_start != (gens + 1) * (POP + NG + 2) + 1) begin
      failures++; $display("run took %0d clocks exp %0d", t_done - t_start - 1, (gens + 1) * (POP + NG + 2));
    end
    if (busy || gen != gens) begin failures++; $display("busy %b gen %0d", busy, gen); end
    if (best_fit != f(best_chrom, tgt)) begin failures++; $display("best_fit %h for %h", best_fit, best_chrom); end
    if (decreases != 0) begin failures++; $display("best fitness decreased %0d times", decreases); end
    if (n_eval != gens + 1) begin failures++; $display("%0d evaluations", n_eval); end
    gap = int'(best_chrom) - int'(tgt); if (gap < 0) gap = -gap;
    if (gap >= 256 || (exact && gap != 0)) begin failures++; $display("best %h target %h", best_chrom, tgt); end
    $display("run: %0d generations, target %h, best %h", gens, tgt, best_chrom);
    repeat (3) @(posedge clk);
    checks++;
    if (!done) begin failures++; $display("done not held"); end
  endtask
  initial begin
    repeat (2) @(posedge clk); #1 rst_n = 1;
    run(60, 8'd60, 8'd200, 16'($urandom), 0);
    run(100, 8'd120, 8'd128, 16'($urandom), 0);
    run(300, 8'd200, 8'd230, 16'($urandom), 1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
