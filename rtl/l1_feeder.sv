// l1_feeder: programmable-logic data mover of the first-layer engine.
//
// For every block of N_DSP neurons the feeder walks the NCHUNK chunks of the
// neuron fan-in. For each chunk it reads N inputs and, for each of the N_DSP
// neurons, the N matching weights from RAM, and presents them as one stream
// beat to the vector kernels. While one chunk is being consumed the next one is
// already being read: a two-entry (ping-pong) buffer with read credits lets a
// chunk leave on every clock as long as the downstream is ready, which is the
// "prepare the next block of n inputs while the AIEs compute" step of the
// reference pipeline.
//
// RAM interface: `rd_en` with `in_addr` (chunk index) and `w_addr`
// (block * NCHUNK + chunk); `in_data` / `w_data` are valid exactly one clock
// after `rd_en` (a registered BRAM/URAM read). The RAM itself is outside.
// Stream interface: valid/ready (AXI4-Stream style), `m_last` marks the last
// chunk of a block, `m_block` its index. Lanes beyond N_INPUTS in the final,
// partial chunk are zeroed, so their weights do not matter.
// Timing: after `start`, first beat valid two clocks later, then one beat per
// clock while `m_ready` is high; `busy` falls after the last beat leaves.
// The buffer depth, the credit scheme and the zero padding are choices of this
// implementation; the chunking and block sizes follow the reference design.
module l1_feeder #(
  parameter int unsigned N_INPUTS = l1_pkg::L1_N_INPUTS,
  parameter int unsigned N        = l1_pkg::L1_N_AIE * l1_pkg::L1_AIE_LANES,
  parameter int unsigned N_DSP    = l1_pkg::L1_N_DSP,
  parameter int unsigned N_BLOCKS = 1
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         start,
  output logic         busy,
  // RAM read port
  output logic         rd_en,
  output logic [31:0]  in_addr,
  output logic [31:0]  w_addr,
  input  l1_pkg::q8_t  in_data [N],
  input  l1_pkg::q8_t  w_data  [N_DSP][N],
  // stream to the kernels
  output logic         m_valid,
  input  logic         m_ready,
  output l1_pkg::q8_t  m_x [N],
  output l1_pkg::q8_t  m_w [N_DSP][N],
  output logic         m_last,
  output logic [31:0]  m_block
);
  localparam int unsigned NCHUNK = l1_pkg::n_chunks(N_INPUTS, N);

  // issue side
  logic        running;
  logic [31:0] chunk_q, block_q;
  // one read in flight (fixed latency 1)
  logic        infl;
  logic [31:0] infl_chunk, infl_block;
  // two-entry buffer
  l1_pkg::q8_t buf_x [2][N];
  l1_pkg::q8_t buf_w [2][N_DSP][N];
  logic        buf_last [2];
  logic [31:0] buf_block [2];
  logic        wr_ptr, rd_ptr;
  logic [1:0]  count;

  logic pop, push;
  logic [1:0] credit_used;

  assign pop         = m_valid && m_ready;
  assign push        = infl;
  assign credit_used = count - {1'b0, pop} + {1'b0, infl};
  assign rd_en       = running && (credit_used < 2'd2);
  assign in_addr     = chunk_q;
  assign w_addr      = block_q * NCHUNK + chunk_q;

  assign m_valid = (count != 2'd0);
  assign m_x     = buf_x[rd_ptr];
  assign m_w     = buf_w[rd_ptr];
  assign m_last  = buf_last[rd_ptr];
  assign m_block = buf_block[rd_ptr];
  assign busy    = running || infl || (count != 2'd0);

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      running    <= 1'b0;
      chunk_q    <= '0;
      block_q    <= '0;
      infl       <= 1'b0;
      infl_chunk <= '0;
      infl_block <= '0;
      wr_ptr     <= 1'b0;
      rd_ptr     <= 1'b0;
      count      <= '0;
    end else begin
      // issue
      infl <= rd_en;
      if (rd_en) begin
        infl_chunk <= chunk_q;
        infl_block <= block_q;
        if (chunk_q == NCHUNK - 1) begin
          chunk_q <= '0;
          if (block_q == N_BLOCKS - 1) begin
            block_q <= '0;
            running <= 1'b0;
          end else begin
            block_q <= block_q + 1;
          end
        end else begin
          chunk_q <= chunk_q + 1;
        end
      end else if (start && !busy) begin
        running <= 1'b1;
        chunk_q <= '0;
        block_q <= '0;
      end
      // buffer pointers
      if (push) wr_ptr <= ~wr_ptr;
      if (pop)  rd_ptr <= ~rd_ptr;
      count <= count + {1'b0, push} - {1'b0, pop};
    end
  end

  // buffer data (no reset needed: guarded by count)
  always_ff @(posedge clk) begin
    if (push) begin
      for (int unsigned i = 0; i < N; i++)
        buf_x[wr_ptr][i] <= (infl_chunk * N + i < N_INPUTS) ? in_data[i] : '0;
      buf_w[wr_ptr]     <= w_data;
      buf_last[wr_ptr]  <= (infl_chunk == NCHUNK - 1);
      buf_block[wr_ptr] <= infl_block;
    end
  end

  // the credit scheme never overfills the buffer
  assert property (@(posedge clk) disable iff (!rst_n) !(push && !pop && count == 2'd2));
endmodule
