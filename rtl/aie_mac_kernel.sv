// aie_mac_kernel: arithmetic of one AI Engine kernel of the first layer.
//
// In the reference design each neuron of the first layer is served by 8 AI
// Engine vector cores that multiply inputs by weights and form partial sums,
// which are then accumulated in the programmable logic. This module is the
// fabric equivalent of one such kernel: a LANES-wide int8 x int8 dot product,
// summed and registered. The AI Engine itself is a programmable VLIW core; only
// the operation it performs in this pipeline is reproduced here.
//
// Interface: when `en` is high the output register loads the dot product of
// `x` and `w` and `out_valid` takes `in_valid`; when `en` is low both hold, so
// the kernel stalls together with the rest of the pipeline.
// Timing: one cycle from operands to `psum`, one result per clock.
// Choices of this implementation: the 32-bit partial-sum width and reset value 0.
module aie_mac_kernel #(
  parameter int unsigned LANES  = l1_pkg::L1_AIE_LANES,
  parameter int unsigned PSUM_W = l1_pkg::L1_PSUM_W
) (
  input  logic                      clk,
  input  logic                      rst_n,
  input  logic                      en,
  input  logic                      in_valid,
  input  l1_pkg::q8_t               x [LANES],
  input  l1_pkg::q8_t               w [LANES],
  output logic                      out_valid,
  output logic signed [PSUM_W-1:0]  psum
);
  logic signed [PSUM_W-1:0] dot;

  always_comb begin
    dot = '0;
    for (int unsigned i = 0; i < LANES; i++)
      dot += PSUM_W'(x[i] * w[i]);
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      out_valid <= 1'b0;
      psum      <= '0;
    end else if (en) begin
      out_valid <= in_valid;
      psum      <= dot;
    end
  end
endmodule
