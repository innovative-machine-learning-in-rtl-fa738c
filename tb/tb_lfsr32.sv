// tb_lfsr32: 32-bit Galois LFSR used as the GA's random source.
// Compares the register against a reference step function for random
// enable/load sequences, checks that a zero seed loads 1 (the all-zero
// lock-up state is never entered), that `en` low holds the value, and that
// no state repeats within the first 200,000 steps from a random seed.
module tb_lfsr32;
  timeunit 1ns; timeprecision 1ps;
  logic clk = 0, rst_n = 0, en = 0, load = 0;
  logic [31:0] seed = 0, value, exp_v;
  int checks = 0, failures = 0;
  lfsr32 dut (.*);
  always #5 clk = ~clk;
  function automatic logic [31:0] step(logic [31:0] v);
    return (v >> 1) ^ (v[0] ? 32'h8020_0003 : 32'd0);
  endfunction
  initial begin
    #50ms;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    logic [31:0] s0;
    bit seen [logic [31:0]];
    repeat (2) @(posedge clk); #1 rst_n = 1;
    checks++; if (value !== 32'd1) begin failures++; $display("reset value %h", value); end
    exp_v = 1;
    for (int i = 0; i < 5000; i++) begin
      en = $urandom % 3 != 0; load = $urandom % 50 == 0;
      seed = ($urandom % 8 == 0) ? 32'd0 : $urandom;
      @(posedge clk); #1;
      if (load) exp_v = (seed == 0) ? 32'd1 : seed;
      else if (en) exp_v = step(exp_v);
      checks++;
      if (value !== exp_v || value == 0) begin failures++; $display("value %h exp %h", value, exp_v); end
    end
    seed = $urandom | 1; load = 1; en = 0; @(posedge clk); #1 load = 0; en = 1;
    s0 = value; seen[s0] = 1;
    for (int i = 0; i < 200_000; i++) begin
      @(posedge clk); #1;
      if (seen.exists(value)) begin failures++; $display("state repeated after %0d steps", i); break; end
      seen[value] = 1;
    end
    checks++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
