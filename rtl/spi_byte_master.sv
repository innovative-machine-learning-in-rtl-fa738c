// spi_byte_master: byte shifter for the W5500 SPI bus (SPI mode 0).
//
// A pulse on `start` sends `tx_byte` MSB first on `mosi` while capturing
// eight bits from `miso`. The clock idles low; `mosi` is set up half a period
// before each rising edge and `miso` is sampled on the rising edge. Each half
// period lasts HALF_DIV system clocks (25 MHz SCLK from 100 MHz with the
// default 2). Chip select is not handled here: the controller keeps it low
// across all bytes of a frame.
// Timing: `done` pulses 16 * HALF_DIV clocks after the edge that samples
// `start`, with `rx_byte`
// valid from then on; `busy` is high in between; a `start` while busy is
// ignored. The SPI mode and rate are this implementation's choices (the
// W5500 accepts modes 0 and 3).
module spi_byte_master #(
  parameter int unsigned HALF_DIV = 2
) (
  input  logic       clk,
  input  logic       rst_n,
  input  logic       start,
  input  logic [7:0] tx_byte,
  output logic       busy,
  output logic       done,
  output logic [7:0] rx_byte,
  output logic       sclk,
  output logic       mosi,
  input  logic       miso
);
  logic [7:0]  txs;
  logic [15:0] hcnt;
  logic [3:0]  edges;

  assign mosi = txs[7];

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      busy    <= 1'b0;
      done    <= 1'b0;
      rx_byte <= '0;
      sclk    <= 1'b0;
      txs     <= '0;
      hcnt    <= '0;
      edges   <= '0;
    end else begin
      done <= 1'b0;
      if (!busy) begin
        if (start) begin
          busy  <= 1'b1;
          txs   <= tx_byte;
          hcnt  <= '0;
          edges <= '0;
        end
      end else if (hcnt == 16'(HALF_DIV - 1)) begin
        hcnt  <= '0;
        sclk  <= ~sclk;
        edges <= edges + 1'b1;
        if (!sclk) begin
          rx_byte <= {rx_byte[6:0], miso};
        end else begin
          txs <= {txs[6:0], 1'b0};
          if (edges == 4'd15) begin
            busy <= 1'b0;
            done <= 1'b1;
          end
        end
      end else begin
        hcnt <= hcnt + 1'b1;
      end
    end
  end
endmodule
