// adc_model: behavioural model of the 14-bit SAR ADC's serial interface
// (testbench only, not synthesizable hardware of the design).
//
// When `cs_n` falls the model takes the conversion result `code` and places a
// 16-bit frame {2'b00, code} on `miso`, most significant bit first; it moves
// to the next bit after every falling `sclk` edge (so the master may sample on
// rising edges). `frames` counts completed frames (cs_n rising after exactly
// 16 clocks); `bad_frames` counts frames of any other length; `frame_t`
// holds the start time of every frame.
// The frame layout matches the design's ADC master; the real converter's
// timing parameters are not modelled.
module adc_model (
  input  logic        cs_n,
  input  logic        sclk,
  output logic        miso,
  input  logic [13:0] code,
  output int          frames,
  output int          bad_frames
);
  timeunit 1ns; timeprecision 1ps;
  logic [15:0] sh;
  int nclk;
  time frame_t [$];   // time at which each frame started (cs_n fell)
  bit in_frame = 0;
  initial begin frames = 0; bad_frames = 0; miso = 1'b0; sh = '0; nclk = 0; end
  always @(negedge cs_n) begin frame_t.push_back($time); in_frame = 1; sh = {2'b00, code}; miso = sh[15]; nclk = 0; end
  always @(posedge sclk) if (!cs_n) nclk++;
  always @(negedge sclk) if (!cs_n) begin sh = {sh[14:0], 1'b0}; miso = sh[15]; end
  always @(posedge cs_n) if (in_frame) begin
    in_frame = 0;
    if (nclk == 16) frames++; else bad_frames++;
  end
endmodule
