// packet_tagger: hardware metadata tagging of the DAQ samples.
//
// The timestamp is latched when a conversion starts (`sample_tick`), so it
// marks the moment the ADC sampled. When the sample arrives (`sample_valid`)
// the tagger forms an 80-bit packet {counter, timestamp, 2'b00, sample} and
// writes it to the FIFO with a one-clock `pkt_valid`. The 32-bit counter
// advances for every sample, whether or not the FIFO accepted it; a sample
// that meets a full FIFO is dropped and counted in `dropped`, and the receiver
// sees the gap in the counter sequence.
// Timing: `pkt_valid` one clock after `sample_valid`; `fifo_full` is looked at
// in the clock of `sample_valid`.
// The counter, the 1 MHz timestamp and the 80-bit packet follow the reference
// design; the field order, timestamp latch point and drop policy are this
// implementation's choices.
module packet_tagger (
  input  logic                clk,
  input  logic                rst_n,
  input  logic                sample_tick,
  input  logic [31:0]         timestamp,
  input  logic                sample_valid,
  input  logic [13:0]         sample,
  input  logic                fifo_full,
  output logic                pkt_valid,
  output daq_pkg::daq_packet_t pkt,
  output logic [31:0]         dropped
);
  logic [31:0] counter, ts_latch;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      counter   <= '0;
      ts_latch  <= '0;
      pkt_valid <= 1'b0;
      pkt       <= '0;
      dropped   <= '0;
    end else begin
      pkt_valid <= 1'b0;
      if (sample_tick) ts_latch <= timestamp;
      if (sample_valid) begin
        counter <= counter + 1;
        if (fifo_full) begin
          dropped <= dropped + 1;
        end else begin
          pkt_valid  <= 1'b1;
          pkt.count  <= counter;
          pkt.tstamp <= ts_latch;
          pkt.spare  <= 2'b00;
          pkt.sample <= sample;
        end
      end
    end
  end
endmodule
