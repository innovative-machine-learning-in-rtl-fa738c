// daq_timebase: sampling tick and microsecond timestamp of the DAQ.
//
// Two free-running dividers of the 100 MHz acquisition clock. The first
// issues `sample_tick`, a one-clock pulse every CLK_HZ / SAMPLE_HZ clocks
// (6,250 clocks = 62.5 us for 16 kS/s), which starts each ADC conversion read.
// The second advances the 32-bit `timestamp` every CLK_HZ / TS_HZ clocks,
// giving a 1 MHz time base with microsecond resolution that wraps after about
// 71.6 minutes. Both dividers restart from zero on reset, and the first tick
// comes one full sampling period after reset.
// The rates are those of the reference design; the reset behaviour is this
// implementation's choice.
module daq_timebase #(
  parameter int unsigned CLK_HZ    = 100_000_000,
  parameter int unsigned SAMPLE_HZ = 16_000,
  parameter int unsigned TS_HZ     = 1_000_000
) (
  input  logic        clk,
  input  logic        rst_n,
  output logic        sample_tick,
  output logic [31:0] timestamp
);
  localparam int unsigned SDIV = CLK_HZ / SAMPLE_HZ;
  localparam int unsigned TDIV = CLK_HZ / TS_HZ;

  logic [31:0] scnt;
  logic [31:0] tcnt;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      scnt        <= '0;
      tcnt        <= '0;
      sample_tick <= 1'b0;
      timestamp   <= '0;
    end else begin
      sample_tick <= 1'b0;
      if (scnt == SDIV - 1) begin
        scnt        <= '0;
        sample_tick <= 1'b1;
      end else begin
        scnt <= scnt + 1;
      end
      if (tcnt == TDIV - 1) begin
        tcnt      <= '0;
        timestamp <= timestamp + 1;
      end else begin
        tcnt <= tcnt + 1;
      end
    end
  end
endmodule
