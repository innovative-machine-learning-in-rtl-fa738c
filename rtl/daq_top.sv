// daq_top: high-rate radiation-monitor DAQ (sensor ADC to TCP stream).
//
// Acquisition domain (clk_acq, 100 MHz): a timebase issues a conversion tick
// every 62.5 us (16 kS/s) and counts a 1 MHz timestamp; the ADC SPI master
// reads each 14-bit conversion on the first SPI bus; the tagger wraps it with
// a 32-bit sample counter and the timestamp into an 80-bit packet and writes
// it to a dual-clock FIFO. Transmission domain (clk_eth): the W5500
// controller, on a second SPI bus of its own, configures the W5500, waits for
// the TCP connection and moves the packets into the socket in blocks of
// BLOCK_PKTS. The two SPI buses run in parallel, so acquisition never waits
// for the network; if the network stalls long enough to fill the FIFO,
// packets are dropped, counted in `dropped`, and show up as gaps in the
// sample counter.
// Reset: `rst_n` is synchronised separately into each domain (two flops).
// Timing: one sample every SAMPLE_HZ^-1; a packet reaches the FIFO 1.6 us
// after its conversion tick; a block leaves once BLOCK_PKTS packets wait
// (default 1, so the packet is in the W5500 about 15 us after the tick).
// The chain, rates and packet follow the reference design; FIFO depth, block
// size, SPI modes and rates are this implementation's choices.
module daq_top #(
  parameter int unsigned CLK_HZ     = 100_000_000,
  parameter int unsigned SAMPLE_HZ  = 16_000,
  parameter int unsigned TS_HZ      = 1_000_000,
  parameter int unsigned FIFO_DEPTH = 512,
  parameter int unsigned BLOCK_PKTS = 1
) (
  input  logic        clk_acq,
  input  logic        clk_eth,
  input  logic        rst_n,
  output logic        adc_cs_n,
  output logic        adc_sclk,
  input  logic        adc_miso,
  output logic        eth_cs_n,
  output logic        eth_sclk,
  output logic        eth_mosi,
  input  logic        eth_miso,
  output logic        established,
  output logic [31:0] dropped,
  output logic [31:0] blocks_sent
);
  localparam int unsigned CW = $clog2(FIFO_DEPTH) + 1;

  // reset synchronisers
  logic [1:0] rs_acq, rs_eth;
  always_ff @(posedge clk_acq) rs_acq <= {rs_acq[0], rst_n};
  always_ff @(posedge clk_eth) rs_eth <= {rs_eth[0], rst_n};
  logic rst_acq_n, rst_eth_n;
  assign rst_acq_n = rs_acq[1] & rst_n;
  assign rst_eth_n = rs_eth[1] & rst_n;

  logic        tick;
  logic [31:0] tstamp;
  logic        s_valid, adc_busy;
  logic [13:0] s_code;
  logic        p_valid, f_full, f_empty, f_rd;
  daq_pkg::daq_packet_t p_data, f_head;
  logic [CW-1:0] f_count;

  daq_timebase #(.CLK_HZ(CLK_HZ), .SAMPLE_HZ(SAMPLE_HZ), .TS_HZ(TS_HZ)) u_tb (
    .clk(clk_acq), .rst_n(rst_acq_n), .sample_tick(tick), .timestamp(tstamp));

  adc_spi_master u_adc (
    .clk(clk_acq), .rst_n(rst_acq_n), .start(tick), .busy(adc_busy),
    .cs_n(adc_cs_n), .sclk(adc_sclk), .miso(adc_miso),
    .sample_valid(s_valid), .sample(s_code));

  packet_tagger u_tag (
    .clk(clk_acq), .rst_n(rst_acq_n), .sample_tick(tick), .timestamp(tstamp),
    .sample_valid(s_valid), .sample(s_code), .fifo_full(f_full),
    .pkt_valid(p_valid), .pkt(p_data), .dropped);

  async_fifo #(.WIDTH(80), .DEPTH(FIFO_DEPTH)) u_fifo (
    .wclk(clk_acq), .wrst_n(rst_acq_n), .wr_en(p_valid), .wdata(p_data), .full(f_full),
    .rclk(clk_eth), .rrst_n(rst_eth_n), .rd_en(f_rd), .rdata(f_head), .empty(f_empty),
    .rcount(f_count));

  w5500_ctrl #(.BLOCK_PKTS(BLOCK_PKTS), .CW(CW)) u_eth (
    .clk(clk_eth), .rst_n(rst_eth_n), .fifo_rdata(f_head), .fifo_empty(f_empty),
    .fifo_count(f_count), .fifo_rd_en(f_rd), .cs_n(eth_cs_n), .sclk(eth_sclk),
    .mosi(eth_mosi), .miso(eth_miso), .established, .blocks_sent);

  // a conversion tick never arrives while the previous frame is still running
  assert property (@(posedge clk_acq) disable iff (!rst_acq_n) tick |-> !adc_busy);
endmodule
