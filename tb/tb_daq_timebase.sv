// tb_daq_timebase: checks the DAQ time base at the reference rates.
// With the 100 MHz defaults the sampling tick must come every 6,250 clocks
// (16 kS/s) and last one clock, and the timestamp must advance by exactly one
// every 100 clocks (1 MHz). The testbench counts clock edges between ticks
// and between timestamp changes over several sampling periods, and checks
// the timestamp value against elapsed clocks at every tick.
module tb_daq_timebase;
  timeunit 1ns; timeprecision 1ps;
  logic clk = 0, rst_n = 0, sample_tick;
  logic [31:0] timestamp;
  int checks = 0, failures = 0;
  daq_timebase dut (.*);
  always #5 clk = ~clk;
  initial begin
    #2_000_000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  int cyc = 0, last_tick = -1, last_ts_change = -1, ticks = 0;
  logic [31:0] last_ts = 0;
  always @(posedge clk) if (rst_n) begin
    cyc++;
    if (sample_tick) begin
      checks++;
      if (last_tick >= 0 && cyc - last_tick != 6250) begin failures++; $display("tick period %0d", cyc - last_tick); end
      // timestamp counts clocks/100 since reset
      if (timestamp != (cyc - 1) / 100) begin failures++; $display("ts %0d at cycle %0d", timestamp, cyc); end
      last_tick = cyc; ticks++;
    end
    if (timestamp != last_ts) begin
      checks++;
      if (timestamp != last_ts + 1) begin failures++; $display("ts jump"); end
      if (last_ts_change >= 0 && cyc - last_ts_change != 100) begin failures++; $display("ts period %0d", cyc - last_ts_change); end
      last_ts_change = cyc; last_ts = timestamp;
    end
  end
  initial begin
    repeat ($urandom_range(2, 5)) @(posedge clk);
    #1 rst_n = 1;
    wait (ticks == 8);
    @(posedge clk); #1;
    checks++;
    if (sample_tick) begin failures++; $display("tick longer than one clock"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
