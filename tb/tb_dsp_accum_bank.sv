// tb_dsp_accum_bank: 3 neurons x 2 partial sums. Drives blocks of random
// length with random partial sums (both signs, small and large, so the
// results cover ReLU clipping, plain rescaling and saturation at 127) and
// compares the raw sums and activations with a model kept in the testbench.
// The output is stalled at random; the test checks that results are neither
// lost nor overwritten and that the stall holds only last beats.
module tb_dsp_accum_bank;
  timeunit 1ns; timeprecision 1ps;
  localparam int ND = 3, NA = 2;
  logic clk = 0, rst_n = 0, in_valid = 0, in_ready, in_last = 0, out_valid, out_ready = 0;
  logic signed [31:0] psum [ND][NA];
  logic [5:0] shift = 6'd4;
  l1_pkg::q8_t out_act [ND];
  logic signed [57:0] out_acc [ND];
  int checks = 0, failures = 0;

  dsp_accum_bank #(.N_DSP(ND), .N_AIE(NA), .PSUM_W(32), .ACC_W(58)) dut (.*);
  always #5 clk = ~clk;

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  longint exp_q [$];
  int stalls = 0, results = 0;

  function automatic int act(longint a, int sh);
    longint s;
    if (a <= 0) return 0;
    s = a >>> sh;
    return (s > 127) ? 127 : int'(s);
  endfunction

  // consumer
  always @(posedge clk) #2 out_ready <= ($urandom % 4 == 0);
  always @(posedge clk) if (rst_n) begin
    if (in_valid && !in_ready) stalls++;
    if (in_valid && !in_ready && !in_last) begin failures++; $display("non-last beat stalled"); end
    if (out_valid && out_ready) begin
      longint e [ND];
      for (int i = 0; i < ND; i++) e[i] = exp_q.pop_front();
      for (int i = 0; i < ND; i++) begin
        checks++;
        if (out_acc[i] !== e[i] || out_act[i] !== act(e[i], shift)) begin
          failures++; $display("neuron %0d got %0d/%0d exp %0d", i, out_acc[i], out_act[i], e[i]);
        end
      end
      results++;
    end
  end

  initial begin
    longint sums [ND];
    repeat (3) @(posedge clk);
    rst_n = 1;
    #1;
    for (int b = 0; b < 60; b++) begin
      automatic int len = 1 + $urandom % 6;
      automatic int mag = (b % 3 == 0) ? 4 : ((b % 3 == 1) ? 200 : 100000);
      for (int i = 0; i < ND; i++) sums[i] = 0;
      for (int c = 0; c < len; c++) begin
        for (int i = 0; i < ND; i++) for (int j = 0; j < NA; j++) begin
          psum[i][j] = $signed($urandom % (2 * mag + 1)) - mag;
          sums[i] += psum[i][j];
        end
        in_valid = 1; in_last = (c == len - 1);
        if (in_last) for (int i = 0; i < ND; i++) exp_q.push_back(sums[i]);
        // in_ready is stable between the consumer update and the next edge
        @(negedge clk);
        while (!in_ready) begin @(posedge clk); @(negedge clk); end
        @(posedge clk); #1;
      end
      in_valid = 0; in_last = 0;
      if ($urandom % 2) begin @(posedge clk); #1; end
    end
    while (results < 60) @(posedge clk);
    checks++;
    if (stalls == 0) begin failures++; $display("no stall exercised"); end
    $display("stalled last beats: %0d", stalls);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
