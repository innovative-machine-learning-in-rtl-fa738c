// thesis_top: the three designs side by side.
//
// 1. l1_engine - first-layer neuron engine of the heterogeneous CNN
//    accelerator (PL data mover, 8 vector kernels per neuron, 25 DSP
//    accumulators). Its weight/input RAM and the following layers are
//    outside; their ports are brought out with the prefix l1_.
// 2. daq_top - the radiation-monitor DAQ (ADC SPI master, timestamp and
//    counter tagging, dual-clock FIFO, W5500 TCP streaming); ADC and W5500
//    pins are brought out with the prefix daq_.
// 3. ga_engine - the genetic-algorithm engine proposed to tune DAQ
//    parameters in the fabric; its run-time registers and results are
//    brought out with the prefix ga_.
// The designs target different devices and share nothing but the reset;
// this top exists to build and simulate them together. clk drives the
// accelerator and the GA and is also the DAQ acquisition clock; clk_eth is
// the DAQ transmission clock. All parameters are at their defaults.
module thesis_top (
  input  logic         clk,
  input  logic         clk_eth,
  input  logic         rst_n,
  // first-layer engine
  input  logic         l1_start,
  output logic         l1_busy,
  input  logic [5:0]   l1_shift,
  output logic         l1_rd_en,
  output logic [31:0]  l1_in_addr,
  output logic [31:0]  l1_w_addr,
  input  l1_pkg::q8_t  l1_in_data [l1_pkg::L1_N_AIE*l1_pkg::L1_AIE_LANES],
  input  l1_pkg::q8_t  l1_w_data  [l1_pkg::L1_N_DSP][l1_pkg::L1_N_AIE*l1_pkg::L1_AIE_LANES],
  output logic         l1_out_valid,
  input  logic         l1_out_ready,
  output l1_pkg::q8_t  l1_out_act [l1_pkg::L1_N_DSP],
  output logic signed [l1_pkg::L1_ACC_W-1:0] l1_out_acc [l1_pkg::L1_N_DSP],
  output logic [31:0]  l1_out_block,
  // DAQ
  output logic         daq_adc_cs_n,
  output logic         daq_adc_sclk,
  input  logic         daq_adc_miso,
  output logic         daq_eth_cs_n,
  output logic         daq_eth_sclk,
  output logic         daq_eth_mosi,
  input  logic         daq_eth_miso,
  output logic         daq_established,
  output logic [31:0]  daq_dropped,
  output logic [31:0]  daq_blocks_sent,
  // genetic algorithm
  input  logic         ga_start,
  input  logic [7:0]   ga_mut_rate,
  input  logic [7:0]   ga_xover_prob,
  input  logic [15:0]  ga_target,
  input  logic [15:0]  ga_gens,
  input  logic [31:0]  ga_seed,
  output logic         ga_busy,
  output logic         ga_done,
  output logic [15:0]  ga_best_chrom,
  output logic [31:0]  ga_best_fit,
  output logic [15:0]  ga_gen
);
  l1_engine u_l1 (
    .clk, .rst_n, .start(l1_start), .busy(l1_busy), .shift(l1_shift),
    .rd_en(l1_rd_en), .in_addr(l1_in_addr), .w_addr(l1_w_addr),
    .in_data(l1_in_data), .w_data(l1_w_data),
    .out_valid(l1_out_valid), .out_ready(l1_out_ready), .out_act(l1_out_act),
    .out_acc(l1_out_acc), .out_block(l1_out_block));

  daq_top u_daq (
    .clk_acq(clk), .clk_eth, .rst_n,
    .adc_cs_n(daq_adc_cs_n), .adc_sclk(daq_adc_sclk), .adc_miso(daq_adc_miso),
    .eth_cs_n(daq_eth_cs_n), .eth_sclk(daq_eth_sclk), .eth_mosi(daq_eth_mosi),
    .eth_miso(daq_eth_miso), .established(daq_established),
    .dropped(daq_dropped), .blocks_sent(daq_blocks_sent));

  ga_engine u_ga (
    .clk, .rst_n, .start(ga_start), .cfg_mut_rate(ga_mut_rate),
    .cfg_xover_prob(ga_xover_prob), .cfg_target(ga_target), .cfg_gens(ga_gens),
    .cfg_seed(ga_seed), .busy(ga_busy), .done(ga_done), .best_chrom(ga_best_chrom),
    .best_fit(ga_best_fit), .gen(ga_gen));
endmodule
