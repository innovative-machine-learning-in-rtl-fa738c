// tb_w5500_ctrl: W5500 streaming controller against the behavioural W5500
// model and a show-ahead packet queue standing in for the FIFO.
// Checks:
//   - configuration: gateway, subnet, MAC, IP, socket mode TCP and port 5000
//     are written to the chip, the socket is opened and put in LISTEN, and
//     `established` rises only after the remote side has connected;
//   - data: the bytes handed to SEND, cut into 10-byte packets (MSB first),
//     are exactly the packets pushed into the queue, in order, in whole
//     whole blocks of BP packets; `blocks_sent` equals the number of SEND
//     commands;
//   - flow control: while the model holds back the freeing of TX buffer
//     space the controller must keep polling TX_FSR and not overrun the
//     buffer (the model counts overruns as errors); the test fails if that
//     wait never happened;
//   - rate: with the queue full, one block of BP packets must take less than
//     the BP * 62.5 us that BP samples last at 16 kS/s (measured between
//     `blocks_sent` increments, 25 MHz SCLK).
module tb_w5500_ctrl;
  timeunit 1ns; timeprecision 1ps;
  logic clk = 0, rst_n = 0, cs_n, sclk, mosi, miso, established, fifo_rd_en;
  logic [31:0] blocks_sent;
  logic hold_drain = 0;
  daq_pkg::daq_packet_t q [$];
  daq_pkg::daq_packet_t all [$];
  daq_pkg::daq_packet_t fifo_rdata;
  logic fifo_empty;
  logic [9:0] fifo_count;
  int checks = 0, failures = 0;
  localparam int BP = 1;                 // packets per block (controller default)

  w5500_ctrl dut (.*);
  w5500_model #(.EST_DELAY(30us), .DRAIN_DELAY(20us)) w5 (.cs_n, .sclk, .mosi, .miso, .hold_drain);
  always #5 clk = ~clk;

  assign fifo_empty = (q.size() == 0);
  assign fifo_count = 10'(q.size());
  assign fifo_rdata = fifo_empty ? '0 : q[0];
  always @(posedge clk) if (fifo_rd_en) begin
    if (q.size() == 0) begin failures++; $display("pop from empty queue"); end
    else void'(q.pop_front());
  end

  initial begin
    #20ms;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic push_pkts(int n);
    for (int i = 0; i < n; i++) begin
      daq_pkg::daq_packet_t p;
      p.count = all.size(); p.tstamp = $urandom; p.spare = 0; p.sample = 14'($urandom);
      q.push_back(p); all.push_back(p);
    end
  endtask

  int fsr_polls = 0, cyc = 0;
  always @(posedge clk) cyc++;
  always @(posedge clk) if (dut.st == dut.ST_DECIDE && dut.op == dut.OP_RD_FSR && dut.rd_val < 10 * BP) fsr_polls++;

  initial begin
    int t_prev, t_max = 0, nb;
    time t_est;
    repeat (3) @(posedge clk); #1 rst_n = 1;
    push_pkts(40);                                  // waiting while not connected
    wait (w5.common[1] != 0);
    wait (established);
    t_est = $time;
    checks += 7;
    if ({w5.common[1], w5.common[2], w5.common[3], w5.common[4]} != 32'hC0A80101) begin failures++; $display("GAR"); end
    if ({w5.common[5], w5.common[6], w5.common[7], w5.common[8]} != 32'hFFFFFF00) begin failures++; $display("SUBR"); end
    if ({w5.common[9], w5.common[10], w5.common[11], w5.common[12], w5.common[13], w5.common[14]} != 48'h020000000001) begin failures++; $display("SHAR"); end
    if ({w5.common[15], w5.common[16], w5.common[17], w5.common[18]} != 32'hC0A80102) begin failures++; $display("SIPR"); end
    if (w5.sock[0] != 8'h01 || {w5.sock[4], w5.sock[5]} != 16'd5000) begin failures++; $display("MR/PORT"); end
    if (w5.sock[3] != 8'h17) begin failures++; $display("SR"); end
    if (t_est < 30us) begin failures++; $display("established before the remote connected"); end
    // phase 1: random packet arrivals
    for (int i = 0; i < 60; i++) begin
      repeat ($urandom_range(100, 2000)) @(posedge clk);
      push_pkts($urandom_range(1, 8));
    end
    // phase 2: slow network, the TX buffer fills and the controller waits
    hold_drain = 1;
    push_pkts(256);                                 // more than the 2 KB buffer holds
    repeat (400_000) @(posedge clk);
    hold_drain = 0;
    // phase 3: full-rate block timing
    wait (q.size() < BP);
    push_pkts(BP * 20);
    nb = blocks_sent; t_prev = -1;
    repeat (20) begin
      @(posedge clk iff blocks_sent != nb);
      nb = blocks_sent;
      if (t_prev >= 0 && (cyc - t_prev) > t_max) t_max = cyc - t_prev;
      t_prev = cyc;
      if (q.size() < BP) break;
    end
    $display("block period %0d clocks", t_max);
    checks++;
    if (t_max == 0 || t_max >= BP * 6250) begin failures++; $display("block period %0d clocks exceeds %0d", t_max, BP * 6250); end
    // drain what is left to whole blocks
    repeat (20_000) @(posedge clk);
    wait (dut.st == dut.ST_WAIT_FIFO);
    // compare the stream
    checks++;
    if (w5.stream.size() != 10 * BP * blocks_sent || w5.sends != blocks_sent) begin
      failures++; $display("stream bytes %0d, sends %0d, blocks %0d", w5.stream.size(), w5.sends, blocks_sent);
    end
    for (int i = 0; i < w5.stream.size() / 10; i++) begin
      logic [79:0] got = '0;
      for (int b = 0; b < 10; b++) got = {got[71:0], w5.stream[10 * i + b]};
      checks++;
      if (i >= all.size() || got !== all[i]) begin failures++; $display("packet %0d got %h", i, got); end
    end
    checks += 3;
    if (all.size() - BP * blocks_sent >= BP) begin failures++; $display("%0d packets not sent", all.size() - BP * blocks_sent); end
    if (w5.errors != 0) begin failures++; $display("W5500 protocol errors %0d", w5.errors); end
    if (fsr_polls == 0) begin failures++; $display("never waited for TX buffer space"); end
    $display("blocks %0d, FSR waits %0d", blocks_sent, fsr_polls);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
