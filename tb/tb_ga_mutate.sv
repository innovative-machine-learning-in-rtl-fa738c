// tb_ga_mutate: LFSR-driven single-bit mutation.
// For random children, rates and random numbers the output must equal the
// input with bit rnd[11:8] flipped when rnd[7:0] < rate, and the input
// otherwise; a rate of 0 must never mutate. Checks that both cases occurred.
module tb_ga_mutate;
  timeunit 1ns; timeprecision 1ps;
  localparam int CW = 16;
  logic [CW-1:0] child_in, child_out;
  logic [7:0] rate;
  logic [11:0] rnd;
  int checks = 0, failures = 0, nm = 0, nn = 0;
  ga_mutate dut (.*);
  initial begin
    #1ms;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    for (int i = 0; i < 5000; i++) begin
      logic [CW-1:0] e;
      child_in = $urandom; rate = (i % 10 == 0) ? 8'd0 : 8'($urandom); rnd = $urandom;
      #1;
      e = child_in;
      if (rnd[7:0] < rate) begin e[rnd[11:8]] = ~e[rnd[11:8]]; nm++; end else nn++;
      checks++;
      if (child_out !== e) begin failures++; $display("out %h exp %h", child_out, e); end
    end
    checks++;
    if (nm == 0 || nn == 0) begin failures++; $display("cases not covered"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
