// tb_daq_top: the DAQ chain from ADC to TCP socket with both chip models.
// The sampling rate is raised to 200 kS/s, the FIFO cut to 64 entries and
// the W5500 blocks set to 16 packets (to keep up with that rate), so
// that a few milliseconds of simulated time cover connection set-up, normal
// streaming, a network stall long enough to overflow the FIFO, and recovery.
// Acquisition runs at 100 MHz and transmission on an unrelated ~97 MHz clock.
// The ADC model returns a code derived from the conversion number, so every
// packet can be checked: sample counter strictly increasing, code matching
// the counter, timestamp advancing 5 us per sample (within 1 us), the gaps in
// the counter adding up to `dropped`. The stall must cause drops (fails if it
// does not), and no drops may occur once the network is released. The
// conversion count must match the tick rate (one per 500 clocks).
module tb_daq_top;
  timeunit 1ns; timeprecision 1ps;
  logic clk_acq = 0, clk_eth = 0, rst_n = 0;
  logic adc_cs_n, adc_sclk, adc_miso, eth_cs_n, eth_sclk, eth_mosi, eth_miso, established;
  logic [31:0] dropped, blocks_sent;
  logic hold_drain = 0;
  logic [13:0] code;
  int frames, bad_frames;
  int checks = 0, failures = 0;

  daq_top #(.SAMPLE_HZ(200_000), .FIFO_DEPTH(64), .BLOCK_PKTS(16)) dut (.*);
  adc_model adc (.cs_n(adc_cs_n), .sclk(adc_sclk), .miso(adc_miso), .code, .frames, .bad_frames);
  w5500_model #(.EST_DELAY(100us), .DRAIN_DELAY(20us)) w5 (
    .cs_n(eth_cs_n), .sclk(eth_sclk), .mosi(eth_mosi), .miso(eth_miso), .hold_drain);
  always #5 clk_acq = ~clk_acq;
  always #5.15 clk_eth = ~clk_eth;

  function automatic logic [13:0] code_of(int k);
    return 14'(k * 7919 + 13 + (k >> 3));
  endfunction
  assign code = code_of(frames);

  initial begin
    #10ms;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int f0, drops_at_release, n, prev_count, prev_ts, ts0, gaps;
    repeat (5) @(posedge clk_acq); #1 rst_n = 1;
    wait (established);
    repeat (50_000) @(posedge clk_acq);             // 0.5 ms normal streaming
    checks++;
    if (dropped != 0) begin failures++; $display("drops without a stall: %0d", dropped); end
    f0 = frames;
    hold_drain = 1;
    repeat (200_000) @(posedge clk_acq);            // 2 ms stall
    checks++;
    if (frames - f0 < 399 || frames - f0 > 401) begin failures++; $display("%0d conversions in 2 ms", frames - f0); end
    hold_drain = 0;
    repeat (100_000) @(posedge clk_acq);            // recover
    drops_at_release = dropped;
    repeat (150_000) @(posedge clk_acq);
    checks += 3;
    if (drops_at_release == 0) begin failures++; $display("the stall caused no drops"); end
    if (dropped != drops_at_release) begin failures++; $display("drops after recovery"); end
    if (bad_frames != 0 || w5.errors != 0) begin failures++; $display("bad ADC frames %0d, W5500 errors %0d", bad_frames, w5.errors); end
    // check the received stream
    n = w5.stream.size() / 10; gaps = 0; prev_count = -1;
    for (int i = 0; i < n; i++) begin
      daq_pkg::daq_packet_t p;
      logic [79:0] v = '0;
      for (int b = 0; b < 10; b++) v = {v[71:0], w5.stream[10 * i + b]};
      p = v;
      checks++;
      if (i == 0) ts0 = p.tstamp - 5 * p.count;
      if (int'(p.count) <= prev_count) begin failures++; $display("counter not increasing at %0d", i); end
      else gaps += p.count - prev_count - 1;
      if (p.sample != code_of(p.count) || p.spare != 0) begin failures++; $display("sample %h for count %0d", p.sample, p.count); end
      if (int'(p.tstamp) - (ts0 + 5 * int'(p.count)) > 1 || int'(p.tstamp) - (ts0 + 5 * int'(p.count)) < -1) begin
        failures++; $display("timestamp %0d for count %0d", p.tstamp, p.count);
      end
      prev_count = p.count;
    end
    checks += 2;
    if (gaps != dropped) begin failures++; $display("gaps %0d, dropped %0d", gaps, dropped); end
    if (n < 700) begin failures++; $display("only %0d packets", n); end
    $display("packets %0d, dropped %0d, blocks %0d", n, dropped, blocks_sent);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
