// tb_packet_tagger: packet fields, counter and drop policy of the tagger.
// Drives random sample ticks, timestamps and samples with the FIFO full flag
// toggled at random. Every sample must advance the counter; an accepted one
// must give pkt_valid one clock after sample_valid with {count, timestamp
// latched at the tick, 2'b00, sample}; a sample meeting a full FIFO must not
// give pkt_valid and must increment `dropped`. Fails if no drop happened.
module tb_packet_tagger;
  timeunit 1ns; timeprecision 1ps;
  logic clk = 0, rst_n = 0, sample_tick = 0, sample_valid = 0, fifo_full = 0, pkt_valid;
  logic [31:0] timestamp = 0, dropped;
  logic [13:0] sample = 0;
  daq_pkg::daq_packet_t pkt;
  int checks = 0, failures = 0;
  packet_tagger dut (.*);
  always #5 clk = ~clk;
  initial begin
    #1_000_000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    int unsigned cnt = 0, drops = 0;
    logic [31:0] ts;
    repeat (3) @(posedge clk); #1 rst_n = 1;
    for (int i = 0; i < 300; i++) begin
      timestamp = $urandom; sample_tick = 1; ts = timestamp;
      @(posedge clk); #1 sample_tick = 0; timestamp = $urandom;
      repeat ($urandom_range(0, 4)) @(posedge clk);
      #1 sample = 14'($urandom); sample_valid = 1; fifo_full = ($urandom % 4 == 0);
      @(posedge clk); #1 sample_valid = 0;
      checks++;
      if (fifo_full) begin
        drops++;
        if (pkt_valid || dropped != drops) begin failures++; $display("drop not handled"); end
      end else begin
        if (!pkt_valid || pkt.count != cnt || pkt.tstamp != ts || pkt.spare != 0 || pkt.sample != sample) begin
          failures++; $display("pkt %h exp count %0d ts %h sample %h", pkt, cnt, ts, sample);
        end
      end
      fifo_full = 0;
      cnt++;
      @(posedge clk); #1;
      checks++;
      if (pkt_valid) begin failures++; $display("pkt_valid longer than a clock"); end
    end
    checks++;
    if (drops == 0) begin failures++; $display("no drop exercised"); end
    $display("drops %0d", drops);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
