// l1_engine: first-layer neuron engine (PL data mover + vector kernels + DSPs).
//
// The first layer's fan-in is too large to finish a neuron in one clock, so it
// is computed incrementally in a three-step pipeline that repeats every clock:
//   1. the feeder reads the next chunk of N = N_AIE * AIE_LANES inputs and the
//      matching weights of a block of N_DSP neurons from RAM;
//   2. N_AIE kernels per neuron (N_DSP * N_AIE kernels in all) multiply
//      inputs by weights and form one partial sum each;
//   3. N_DSP accumulators add the partial sums of their neuron; after the last
//      chunk they apply the activation and pass the 25 results on.
// While step 2 works on chunk k the feeder already holds chunk k+1, so the
// flow is continuous. With the defaults (1,953,125 inputs, 128 inputs per
// chunk) a block of 25 neurons takes NCHUNK = 15,259 beats.
//
// Interface: pulse `start` to run N_BLOCKS blocks; `busy` stays high until
// the last partial sums reach the accumulators. RAM: see l1_feeder (read data
// one clock after `rd_en`). Results: `out_valid`/`out_ready` with 25 int8
// activations `out_act`, their raw sums `out_acc` and the block index `out_block`; holding `out_ready`
// low stalls the pipeline only when a second result is ready.
// Latency: out_valid rises NCHUNK + 3 clocks after the edge that samples `start`; one block every
// NCHUNK clocks when the output is not stalled.
// The partition into the three steps and the 8 / 25 / 125^3 sizes follow the
// reference design; handshakes, widths and the requantisation are this
// implementation's choices.
module l1_engine #(
  parameter int unsigned N_INPUTS  = l1_pkg::L1_N_INPUTS,
  parameter int unsigned N_AIE     = l1_pkg::L1_N_AIE,
  parameter int unsigned AIE_LANES = l1_pkg::L1_AIE_LANES,
  parameter int unsigned N_DSP     = l1_pkg::L1_N_DSP,
  parameter int unsigned N_BLOCKS  = 1,
  parameter int unsigned PSUM_W    = l1_pkg::L1_PSUM_W,
  parameter int unsigned ACC_W     = l1_pkg::L1_ACC_W
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         start,
  output logic         busy,
  input  logic [5:0]   shift,
  output logic         rd_en,
  output logic [31:0]  in_addr,
  output logic [31:0]  w_addr,
  input  l1_pkg::q8_t  in_data [N_AIE*AIE_LANES],
  input  l1_pkg::q8_t  w_data  [N_DSP][N_AIE*AIE_LANES],
  output logic         out_valid,
  input  logic         out_ready,
  output l1_pkg::q8_t  out_act [N_DSP],
  output logic signed [ACC_W-1:0] out_acc [N_DSP],
  output logic [31:0]  out_block
);
  localparam int unsigned N = N_AIE * AIE_LANES;

  // stage 1: feeder
  logic        f_valid, f_ready, f_last, f_busy;
  logic [31:0] f_block;
  l1_pkg::q8_t f_x [N];
  l1_pkg::q8_t f_w [N_DSP][N];

  l1_feeder #(.N_INPUTS(N_INPUTS), .N(N), .N_DSP(N_DSP), .N_BLOCKS(N_BLOCKS)) u_feeder (
    .clk, .rst_n, .start, .busy(f_busy),
    .rd_en, .in_addr, .w_addr, .in_data, .w_data,
    .m_valid(f_valid), .m_ready(f_ready), .m_x(f_x), .m_w(f_w),
    .m_last(f_last), .m_block(f_block));

  // stage 2: kernels
  logic        s2_en, s2_last, a_ready;
  logic [31:0] s2_block;
  logic        kv [N_DSP][N_AIE];
  logic signed [PSUM_W-1:0] psum [N_DSP][N_AIE];

  assign s2_en   = !kv[0][0] || a_ready;
  assign f_ready = s2_en;

  for (genvar i = 0; i < N_DSP; i++) begin : g_neuron
    for (genvar j = 0; j < N_AIE; j++) begin : g_kernel
      l1_pkg::q8_t kx [AIE_LANES];
      l1_pkg::q8_t kw [AIE_LANES];
      for (genvar l = 0; l < AIE_LANES; l++) begin : g_lane
        assign kx[l] = f_x[j*AIE_LANES + l];
        assign kw[l] = f_w[i][j*AIE_LANES + l];
      end
      aie_mac_kernel #(.LANES(AIE_LANES), .PSUM_W(PSUM_W)) u_kernel (
        .clk, .rst_n, .en(s2_en), .in_valid(f_valid), .x(kx), .w(kw),
        .out_valid(kv[i][j]), .psum(psum[i][j]));
    end
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      s2_last  <= 1'b0;
      s2_block <= '0;
    end else if (s2_en) begin
      s2_last  <= f_last;
      s2_block <= f_block;
    end
  end

  // stage 3: DSP accumulators + activation
  dsp_accum_bank #(.N_DSP(N_DSP), .N_AIE(N_AIE), .PSUM_W(PSUM_W), .ACC_W(ACC_W)) u_dsp (
    .clk, .rst_n, .in_valid(kv[0][0]), .in_ready(a_ready), .in_last(s2_last),
    .psum, .shift, .out_valid, .out_ready, .out_act, .out_acc);

  always_ff @(posedge clk) begin
    if (!rst_n) out_block <= '0;
    else if (kv[0][0] && a_ready && s2_last) out_block <= s2_block;
  end

  assign busy = f_busy || kv[0][0];
endmodule
