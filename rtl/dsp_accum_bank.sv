// dsp_accum_bank: the shared DSP accumulators of the first-layer engine.
//
// One accumulator per neuron of a block (N_DSP = 25). On every accepted beat
// accumulator i adds the N_AIE partial sums delivered by the kernels of neuron
// i. The first beat of a block starts from zero. On the beat flagged `in_last`
// the completed sum is passed through the activation (ReLU), rescaled by an
// arithmetic right shift of `shift` bits and saturated to the int8 range
// [0, 127]; the 25 activations are then offered to the next layer on a
// valid/ready output, together with the raw sums.
//
// Timing: one clock from the last beat to `out_valid`. A new beat is accepted
// every clock; only a last beat waits (in_ready low) while an earlier result
// has not yet been taken, so the 25 neurons of the next block keep
// accumulating during an output stall.
// The accumulate/activate split follows the reference pipeline; the ReLU
// choice, the shift-and-saturate rescaling and the 58-bit width (a DSP58
// accumulator) are choices of this implementation.
module dsp_accum_bank #(
  parameter int unsigned N_DSP  = l1_pkg::L1_N_DSP,
  parameter int unsigned N_AIE  = l1_pkg::L1_N_AIE,
  parameter int unsigned PSUM_W = l1_pkg::L1_PSUM_W,
  parameter int unsigned ACC_W  = l1_pkg::L1_ACC_W
) (
  input  logic                     clk,
  input  logic                     rst_n,
  input  logic                     in_valid,
  output logic                     in_ready,
  input  logic                     in_last,
  input  logic signed [PSUM_W-1:0] psum [N_DSP][N_AIE],
  input  logic [5:0]               shift,
  output logic                     out_valid,
  input  logic                     out_ready,
  output l1_pkg::q8_t              out_act [N_DSP],
  output logic signed [ACC_W-1:0]  out_acc [N_DSP]
);
  logic signed [ACC_W-1:0] acc     [N_DSP];
  logic signed [ACC_W-1:0] acc_new [N_DSP];
  logic                    fresh;
  logic                    take;

  assign in_ready = !(in_last && out_valid && !out_ready);
  assign take     = in_valid && in_ready;

  function automatic l1_pkg::q8_t relu_requant(logic signed [ACC_W-1:0] a, logic [5:0] sh);
    logic signed [ACC_W-1:0] s;
    if (a <= 0) return '0;
    s = a >>> sh;
    if (s > 127) return 8'sd127;
    return l1_pkg::q8_t'(s[7:0]);
  endfunction

  always_comb begin
    for (int unsigned i = 0; i < N_DSP; i++) begin
      acc_new[i] = fresh ? '0 : acc[i];
      for (int unsigned j = 0; j < N_AIE; j++)
        acc_new[i] += ACC_W'(psum[i][j]);
    end
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      fresh     <= 1'b1;
      out_valid <= 1'b0;
      for (int unsigned i = 0; i < N_DSP; i++) begin
        acc[i]     <= '0;
        out_acc[i] <= '0;
        out_act[i] <= '0;
      end
    end else begin
      if (out_valid && out_ready) out_valid <= 1'b0;
      if (take) begin
        fresh <= in_last;
        for (int unsigned i = 0; i < N_DSP; i++) acc[i] <= acc_new[i];
        if (in_last) begin
          out_valid <= 1'b1;
          for (int unsigned i = 0; i < N_DSP; i++) begin
            out_acc[i] <= acc_new[i];
            out_act[i] <= relu_requant(acc_new[i], shift);
          end
        end
      end
    end
  end
endmodule
