// adc_spi_master: SPI master reading the 14-bit SAR ADC of the DAQ.
//
// A pulse on `start` (the 16 kHz sampling tick) opens one frame: `cs_n` goes
// low, then FRAME_BITS serial clocks are produced, each half period lasting
// SCLK_HALF system clocks (10 MHz SCLK from 100 MHz). The clock idles low;
// the ADC changes its output after each falling edge and the master samples
// `miso` at each rising edge, most significant bit first. The frame holds two
// leading zeros followed by the 14-bit code. After the last falling edge
// `cs_n` returns high and the code appears on `sample` with a one-clock
// `sample_valid` strobe. A `start` during a frame is ignored.
// Timing: `sample_valid` rises 2 * FRAME_BITS * SCLK_HALF clocks after the
// edge that samples `start` (160 clocks, 1.6 us, with the defaults), well
// inside the 62.5 us sampling period.
// The 14-bit resolution, SPI link and master role follow the reference
// design; the frame layout, SPI mode and SCLK rate are this implementation's
// choices.
module adc_spi_master #(
  parameter int unsigned ADC_BITS   = 14,
  parameter int unsigned FRAME_BITS = 16,
  parameter int unsigned SCLK_HALF  = 5
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic                start,
  output logic                busy,
  output logic                cs_n,
  output logic                sclk,
  input  logic                miso,
  output logic                sample_valid,
  output logic [ADC_BITS-1:0] sample
);
  logic [FRAME_BITS-1:0] shreg;
  logic [15:0]           hcnt;
  logic [7:0]            edges;

  assign busy = !cs_n;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      cs_n         <= 1'b1;
      sclk         <= 1'b0;
      shreg        <= '0;
      hcnt         <= '0;
      edges        <= '0;
      sample_valid <= 1'b0;
      sample       <= '0;
    end else begin
      sample_valid <= 1'b0;
      if (cs_n) begin
        if (start) begin
          cs_n  <= 1'b0;
          hcnt  <= '0;
          edges <= '0;
        end
      end else if (hcnt == 16'(SCLK_HALF - 1)) begin
        hcnt <= '0;
        sclk <= ~sclk;
        if (!sclk) shreg <= {shreg[FRAME_BITS-2:0], miso};
        if (edges == 8'(2 * FRAME_BITS - 1)) begin
          cs_n         <= 1'b1;
          sample_valid <= 1'b1;
          sample       <= shreg[ADC_BITS-1:0];
        end
        edges <= edges + 1'b1;
      end else begin
        hcnt <= hcnt + 1'b1;
      end
    end
  end
endmodule
