// l1_pkg: shared types and default sizes of the first-layer neuron engine.
//
// The first CNN layer has a very large fan-in (125 x 125 x 125 inputs per
// neuron), so each neuron is computed over many clock cycles. Per cycle one
// "chunk" of N_AIE * AIE_LANES inputs is consumed: 8 vector kernels per neuron
// each multiply 16 int8 inputs by 16 int8 weights, and a block of 25 neurons is
// processed together, one DSP accumulator per neuron. The numbers 125^3, 8 and
// 25 are those of the reference design; the 16-lane kernel width is the 8-bit
// MAC rate quoted for one AI Engine core. The widths of partial sums and the
// requantisation shift are choices of this implementation.
package l1_pkg;
  localparam int unsigned L1_N_INPUTS   = 125 * 125 * 125;  // 1,953,125
  localparam int unsigned L1_N_AIE      = 8;    // kernels per neuron
  localparam int unsigned L1_AIE_LANES  = 16;   // int8 MACs per kernel per cycle
  localparam int unsigned L1_N_DSP      = 25;   // neurons per block / DSP accumulators
  localparam int unsigned L1_PSUM_W     = 32;   // kernel partial-sum width
  localparam int unsigned L1_ACC_W      = 58;   // DSP58 accumulator width

  typedef logic signed [7:0] q8_t;

  // Number of chunks needed for fan-in n_in with chunk size n (rounded up).
  function automatic int unsigned n_chunks(int unsigned n_in, int unsigned n);
    return (n_in + n - 1) / n;
  endfunction
endpackage
