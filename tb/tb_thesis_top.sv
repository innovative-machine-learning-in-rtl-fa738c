// tb_thesis_top: end-to-end test of the top level with every parameter at
// its default (full size), running the three designs at the same time.
//
// First-layer engine: one block of 25 neurons over the full 1,953,125-input
// fan-in (15,259 chunks of 128). A RAM model returns hash-derived int8 data
// one clock after each read; the testbench computes the 25 reference sums
// directly from the same formula and checks the raw sums, the activations
// (shift 16), the block index, that the result appears NCHUNK + 3 clocks
// after start, and holds the output for a while (output stall).
// DAQ at 16 kS/s with the ADC and W5500 models: connection set-up, normal
// streaming, a 50 ms network stall that fills the W5500 buffer and then the
// 512-entry FIFO (drops), and recovery. Every packet received is checked
// (increasing counter, code matching the counter, 62.5 us timestamp step,
// gaps equal to `dropped`); the sampling rate is checked by counting
// conversions over 10 ms, and the time from each conversion to the SEND that
// carries its packet must stay below 0.1 ms while the network is healthy
// (from 1 ms after the connection until the stall).
// GA: two runs with different run-time settings (a reconfiguration).
// Mechanism counters (each must be non-zero or the test fails): l1 output
// stall cycles, l1 results, DAQ connections, DAQ blocks sent, DAQ waits for
// TX buffer space, DAQ drops, GA generations, GA reconfigurations.
module tb_thesis_top;
  timeunit 1ns; timeprecision 1ps;
  import l1_pkg::*;
  localparam int N = L1_N_AIE * L1_AIE_LANES, ND = L1_N_DSP;
  localparam int NCHUNK = (L1_N_INPUTS + N - 1) / N;
  logic clk = 0, clk_eth = 0, rst_n = 0;
  logic l1_start = 0, l1_busy, l1_rd_en, l1_out_valid, l1_out_ready = 0;
  logic [5:0] l1_shift = 6'd16;
  logic [31:0] l1_in_addr, l1_w_addr, l1_out_block;
  q8_t l1_in_data [N], l1_w_data [ND][N], l1_out_act [ND];
  logic signed [L1_ACC_W-1:0] l1_out_acc [ND];
  logic daq_adc_cs_n, daq_adc_sclk, daq_adc_miso, daq_eth_cs_n, daq_eth_sclk, daq_eth_mosi, daq_eth_miso;
  logic daq_established;
  logic [31:0] daq_dropped, daq_blocks_sent;
  logic ga_start = 0, ga_busy, ga_done;
  logic [7:0] ga_mut_rate = 0, ga_xover_prob = 0;
  logic [15:0] ga_target = 0, ga_gens = 0, ga_best_chrom, ga_gen;
  logic [31:0] ga_seed = 0, ga_best_fit;
  logic hold_drain = 0;
  logic [13:0] code;
  int frames, bad_frames;
  int checks = 0, failures = 0;

  thesis_top dut (.*);
  adc_model adc (.cs_n(daq_adc_cs_n), .sclk(daq_adc_sclk), .miso(daq_adc_miso), .code, .frames, .bad_frames);
  w5500_model #(.EST_DELAY(200us), .DRAIN_DELAY(100us)) w5 (
    .cs_n(daq_eth_cs_n), .sclk(daq_eth_sclk), .mosi(daq_eth_mosi), .miso(daq_eth_miso), .hold_drain);
  always #5 clk = ~clk;
  always #5.15 clk_eth = ~clk_eth;

  // ---------------- data formulas
  function automatic q8_t hx(int a, int l);
    int unsigned h = (a * 32'd2654435761) ^ (l * 32'd40503 + 32'h9e37);
    return q8_t'(h >> 11);
  endfunction
  function automatic q8_t hw(int r, int n, int l);
    int unsigned h = (r * 32'd2246822519) ^ (n * 32'd3266489917) ^ (l * 32'd668265263);
    return q8_t'(h >> 13);
  endfunction
  function automatic logic [13:0] code_of(int k);
    return 14'(k * 7919 + 13 + (k >> 3));
  endfunction
  assign code = code_of(frames);

  always_ff @(posedge clk) if (l1_rd_en) begin
    for (int l = 0; l < N; l++) l1_in_data[l] <= hx(l1_in_addr, l);
    for (int n = 0; n < ND; n++) for (int l = 0; l < N; l++) l1_w_data[n][l] <= hw(l1_w_addr, n, l);
  end

  // ---------------- mechanism counters
  int m_l1_stall = 0, m_l1_results = 0, m_connect = 0, m_blocks = 0, m_fsr_wait = 0, m_drops = 0;
  int m_ga_gens = 0, m_ga_reconf = 0;
  int cyc = 0, t_l1_start = -1, t_l1_valid = -1;
  always @(posedge clk) begin
    cyc++;
    if (l1_start) t_l1_start = cyc;
    if (rst_n && l1_out_valid && t_l1_valid < 0) t_l1_valid = cyc;
    if (l1_out_valid && !l1_out_ready) m_l1_stall++;
  end

  initial begin
    #100ms;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ---------------- first-layer engine
  longint ref_acc [ND];
  initial begin
    for (int n = 0; n < ND; n++) ref_acc[n] = 0;
    for (int i = 0; i < L1_N_INPUTS; i++) begin
      automatic int c = i / N, l = i % N;
      automatic longint x = longint'(hx(c, l));
      for (int n = 0; n < ND; n++) ref_acc[n] += x * longint'(hw(c, n, l));
    end
    wait (rst_n);
    @(posedge clk); #1 l1_start = 1; @(posedge clk); #1 l1_start = 0;
    wait (l1_out_valid);
    repeat (100) @(posedge clk);
    #1 l1_out_ready = 1;
    @(posedge clk);
    begin
      int npos = 0;
      checks++;
      if (l1_out_block != 0) begin failures++; $display("l1 block %0d", l1_out_block); end
      for (int n = 0; n < ND; n++) begin
        automatic longint e = ref_acc[n];
        automatic int a = (e <= 0) ? 0 : ((e >>> 16) > 127) ? 127 : int'(e >>> 16);
        checks++;
        if (l1_out_acc[n] !== L1_ACC_W'(e) || l1_out_act[n] !== q8_t'(a)) begin
          failures++; $display("l1 neuron %0d got %0d/%0d exp %0d/%0d", n, l1_out_acc[n], l1_out_act[n], e, a);
        end
        if (a > 0) npos++;
        m_l1_results++;
      end
      $display("l1: %0d of %0d neurons active", npos, ND);
    end
    #1 l1_out_ready = 0;
    checks += 2;
    // out_valid rises NCHUNK + 3 clocks after the start edge, seen one edge later
    if (t_l1_valid - t_l1_start != NCHUNK + 4) begin failures++; $display("l1 latency %0d exp %0d", t_l1_valid - t_l1_start - 1, NCHUNK + 3); end
    @(posedge clk); #1;
    if (l1_busy || l1_out_valid) begin failures++; $display("l1 not idle"); end
  end

  // ---------------- GA
  initial begin
    wait (rst_n);
    repeat (10) @(posedge clk);
    for (int r = 0; r < 2; r++) begin
      automatic logic [15:0] tgt = 16'($urandom);
      #1 ga_target = tgt; ga_gens = (r == 0) ? 16'd150 : 16'd300; ga_seed = $urandom;
      ga_mut_rate = (r == 0) ? 8'd100 : 8'd200; ga_xover_prob = (r == 0) ? 8'd150 : 8'd230;
      ga_start = 1; @(posedge clk); #1 ga_start = 0;
      wait (ga_done); @(negedge clk);
      checks += 2;
      if (ga_gen != ga_gens) begin failures++; $display("ga generations %0d", ga_gen); end
      if (ga_best_chrom > tgt + 256 || ga_best_chrom + 256 < tgt) begin failures++; $display("ga best %h target %h", ga_best_chrom, tgt); end
      $display("ga run %0d: target %h best %h", r, tgt, ga_best_chrom);
      m_ga_gens += ga_gen;
      if (r > 0) m_ga_reconf++;
    end
  end

  // ---------------- DAQ
  initial begin
    int f0, drops_at_release, n, prev_count, ts0, gaps, count_at_stall, si;
    time lat, lat_max, t_est;
    repeat (5) @(posedge clk); #1 rst_n = 1;
    wait (daq_established);
    t_est = $time;
    m_connect++;
    f0 = frames;
    repeat (1_000_000) @(posedge clk);                       // 10 ms streaming
    checks += 2;
    if (frames - f0 < 159 || frames - f0 > 161) begin failures++; $display("%0d conversions in 10 ms", frames - f0); end
    if (daq_dropped != 0) begin failures++; $display("drops without a stall"); end
    count_at_stall = frames;
    hold_drain = 1;
    repeat (5_000_000) @(posedge clk);                       // 50 ms network stall
    hold_drain = 0;
    repeat (1_500_000) @(posedge clk);                       // recovery
    drops_at_release = daq_dropped;
    repeat (1_000_000) @(posedge clk);
    checks += 2;
    if (daq_dropped != drops_at_release) begin failures++; $display("drops after recovery"); end
    if (bad_frames != 0 || w5.errors != 0) begin failures++; $display("bad ADC frames %0d, W5500 errors %0d", bad_frames, w5.errors); end
    n = w5.stream.size() / 10; gaps = 0; prev_count = -1;
    for (int i = 0; i < n; i++) begin
      daq_pkg::daq_packet_t p;
      logic [79:0] v = '0;
      for (int b = 0; b < 10; b++) v = {v[71:0], w5.stream[10 * i + b]};
      p = v;
      checks++;
      if (i == 0) ts0 = int'(p.tstamp) - (125 * int'(p.count)) / 2;
      if (int'(p.count) <= prev_count) begin failures++; $display("counter not increasing at %0d", i); end
      else gaps += p.count - prev_count - 1;
      if (p.sample != code_of(p.count)) begin failures++; $display("sample %h for count %0d", p.sample, p.count); end
      if (int'(p.tstamp) - (ts0 + (125 * int'(p.count)) / 2) > 1 || int'(p.tstamp) - (ts0 + (125 * int'(p.count)) / 2) < -1) begin
        failures++; $display("timestamp %0d for count %0d", p.tstamp, p.count);
      end
      prev_count = p.count;
    end
    // conversion-to-SEND latency of the packets streamed before the stall
    lat_max = 0; si = 0;
    for (int i = 0; i < n && i < count_at_stall - 1; i++) begin
      while (si < w5.send_end.size() && w5.send_end[si] < 10 * (i + 1)) si++;
      lat = w5.send_t[si] - adc.frame_t[i];
      // samples taken before the connection (plus 1 ms to drain them) wait by design
      if (adc.frame_t[i] > t_est + 1ms && lat > lat_max) lat_max = lat;
    end
    $display("daq: longest conversion-to-SEND time %0d ns", lat_max);
    checks++;
    if (lat_max == 0 || lat_max > 100us) begin failures++; $display("latency above 0.1 ms"); end
    checks++;
    if (gaps != daq_dropped) begin failures++; $display("gaps %0d, dropped %0d", gaps, daq_dropped); end
    m_blocks = daq_blocks_sent; m_drops = daq_dropped;
    m_fsr_wait = w5.fsr_reads - w5.sends;   // reads beyond one per block found the buffer full
    $display("daq: %0d packets received, %0d dropped, %0d blocks", n, daq_dropped, daq_blocks_sent);
    wait (!ga_busy && m_l1_results > 0);
    $display("mechanisms: l1_stall=%0d l1_results=%0d connect=%0d blocks=%0d fsr_wait=%0d drops=%0d ga_gens=%0d ga_reconf=%0d",
             m_l1_stall, m_l1_results, m_connect, m_blocks, m_fsr_wait, m_drops, m_ga_gens, m_ga_reconf);
    checks++;
    if (m_l1_stall == 0 || m_l1_results == 0 || m_connect == 0 || m_blocks == 0 || m_fsr_wait == 0 ||
        m_drops == 0 || m_ga_gens == 0 || m_ga_reconf == 0) begin
      failures++; $display("a mechanism never happened");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
