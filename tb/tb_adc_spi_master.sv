// tb_adc_spi_master: ADC SPI master against the behavioural ADC model.
// Random 14-bit codes (including all-zero and all-one) are converted at
// random start times; each read must return the code, raise sample_valid
// exactly 160 clocks after the edge that samples start, produce a 16-clock frame with SCLK half periods
// of 5 clocks (10 MHz), and ignore a start pulse during a frame.
module tb_adc_spi_master;
  timeunit 1ns; timeprecision 1ps;
  logic clk = 0, rst_n = 0, start = 0, busy, cs_n, sclk, miso, sample_valid;
  logic [13:0] sample, code;
  int frames, bad_frames;
  int checks = 0, failures = 0;
  adc_spi_master dut (.*);
  adc_model adc (.cs_n, .sclk, .miso, .code, .frames, .bad_frames);
  always #5 clk = ~clk;
  initial begin
    #3_000_000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  int cyc = 0, last_edge = -1, t_start, t_valid;
  // start and sample_valid are sampled on the same edges here, so a pulse
  // that rises N clocks after the start edge is seen N + 1 edges later
  always @(posedge clk) begin
    cyc++;
    if (start && cs_n) t_start = cyc;
    if (sample_valid) t_valid = cyc;
  end
  logic sclk_d = 0;
  always @(posedge clk) begin
    if (sclk !== sclk_d) begin
      if (last_edge >= 0 && !cs_n && cyc - last_edge != 5) begin failures++; $display("sclk half period %0d", cyc - last_edge); end
      last_edge = cyc;
    end
    sclk_d = sclk;
    if (cs_n) last_edge = -1;
  end
  initial begin
    int n = 200;
    repeat (3) @(posedge clk); #1 rst_n = 1;
    for (int i = 0; i < n; i++) begin
      code = (i == 0) ? 14'h0 : (i == 1) ? 14'h3fff : 14'($urandom);
      repeat ($urandom_range(0, 20)) @(posedge clk);
      #1 start = 1; @(posedge clk); #1 start = 0;
      if (i % 7 == 3) begin repeat (40) @(posedge clk); #1 start = 1; @(posedge clk); #1 start = 0; end
      while (!sample_valid) @(posedge clk);
      @(negedge clk);
      checks += 2;
      if (sample !== code) begin failures++; $display("read %h exp %h", sample, code); end
      if (t_valid - t_start != 161) begin failures++; $display("conversion took %0d clocks", t_valid - t_start); end
      @(posedge clk); #1;
    end
    repeat (5) @(posedge clk);
    checks += 2;
    if (frames != n) begin failures++; $display("frames %0d exp %0d", frames, n); end
    if (bad_frames != 0) begin failures++; $display("bad frames %0d", bad_frames); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
