// tb_ga_fitness_unit: four-lane fitness pipeline.
// Random chromosomes and targets (with the extremes 0 and 0xFFFF) enter with
// random gaps; each result must appear exactly two clocks after its input,
// with out_valid mirroring in_valid, and equal 0xFFFFFFFF - (c - target)^2.
module tb_ga_fitness_unit;
  timeunit 1ns; timeprecision 1ps;
  localparam int L = 4, CW = 16;
  logic clk = 0, rst_n = 0, in_valid = 0, out_valid;
  logic [CW-1:0] chrom [L], target = 0;
  logic [31:0] fit [L];
  logic [31:0] exp_q [$];
  bit v_q [$];
  int checks = 0, failures = 0;
  ga_fitness_unit dut (.*);
  always #5 clk = ~clk;
  function automatic logic [31:0] f(logic [CW-1:0] c, logic [CW-1:0] t);
    longint d = longint'(c) - longint'(t);
    return 32'(64'hFFFF_FFFF - d * d);
  endfunction
  initial begin
    #1ms;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (2) @(posedge clk); #1 rst_n = 1;
    for (int i = 0; i < 3000; i++) begin
      in_valid = $urandom % 3 != 0;
      target = (i % 97 == 0) ? 16'hFFFF : 16'($urandom);
      for (int l = 0; l < L; l++) chrom[l] = (i % 89 == 0) ? 16'h0 : 16'($urandom);
      v_q.push_back(in_valid);
      for (int l = 0; l < L; l++) exp_q.push_back(f(chrom[l], target));
      @(posedge clk); #1;
      // after the edge that takes input i the outputs belong to input i-1
      if (i >= 1) begin
        automatic bit ev = v_q.pop_front();
        checks++;
        if (out_valid !== ev) begin failures++; $display("out_valid %b exp %b", out_valid, ev); end
        for (int l = 0; l < L; l++) begin
          automatic logic [31:0] e = exp_q.pop_front();
          if (ev) begin
            checks++;
            if (fit[l] !== e) begin failures++; $display("fit %h exp %h", fit[l], e); end
          end
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
