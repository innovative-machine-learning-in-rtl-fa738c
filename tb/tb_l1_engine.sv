// tb_l1_engine: reduced first-layer engine (100 inputs, 2 kernels x 4 lanes
// per neuron, 3 neurons per block, 2 blocks) against a RAM model whose
// contents are a hash of the address. The expected neuron sums are computed
// in the testbench directly from the formula, so the chunking, padding,
// kernel slicing and accumulation are all checked end to end, along with
// the ReLU/shift activation. Pass 1 keeps the output ready and checks the
// latency (out_valid rises NCHUNK + 3 clocks after the edge sampling start) and the rate (one
// block every NCHUNK clocks). Pass 2 holds the first result long enough for
// the stall to reach the RAM reads, then stalls the output at random.
module tb_l1_engine;
  timeunit 1ns; timeprecision 1ps;
  localparam int N_INPUTS = 100, NA = 2, NL = 4, ND = 3, NB = 2;
  localparam int N = NA * NL, NCHUNK = (N_INPUTS + N - 1) / N;
  logic clk = 0, rst_n = 0, start = 0, busy, rd_en, out_valid, out_ready = 1;
  logic [5:0] shift = 6'd6;
  logic [31:0] in_addr, w_addr, out_block;
  l1_pkg::q8_t in_data [N], w_data [ND][N], out_act [ND];
  logic signed [57:0] out_acc [ND];
  int checks = 0, failures = 0;

  l1_engine #(.N_INPUTS(N_INPUTS), .N_AIE(NA), .AIE_LANES(NL), .N_DSP(ND), .N_BLOCKS(NB)) dut (.*);
  always #5 clk = ~clk;

  function automatic l1_pkg::q8_t hx(int a, int l);
    int unsigned h = (a * 32'd2654435761) ^ (l * 32'd40503 + 32'h9e37);
    return l1_pkg::q8_t'(h >> 11);
  endfunction
  function automatic l1_pkg::q8_t hw(int r, int n, int l);
    int unsigned h = (r * 32'd2246822519) ^ (n * 32'd3266489917) ^ (l * 32'd668265263);
    return l1_pkg::q8_t'(h >> 13);
  endfunction

  always_ff @(posedge clk) if (rd_en) begin
    for (int l = 0; l < N; l++) in_data[l] <= hx(in_addr, l);
    for (int n = 0; n < ND; n++) for (int l = 0; l < N; l++) w_data[n][l] <= hw(w_addr, n, l);
  end

  function automatic longint ref_sum(int blk, int n);
    longint s = 0;
    for (int i = 0; i < N_INPUTS; i++)
      s += longint'(hx(i / N, i % N)) * longint'(hw(blk * NCHUNK + i / N, n, i % N));
    return s;
  endfunction
  function automatic int act(longint a, int sh);
    longint s;
    if (a <= 0) return 0;
    s = a >>> sh;
    return (s > 127) ? 127 : int'(s);
  endfunction

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int cyc = 0, t_start, nres, t_res [NB], stalls, pos_seen, zero_seen;
  bit random_ready;
  always @(posedge clk) cyc <= cyc + 1;
  // pass 2: the first result is held for 3 * NCHUNK clocks, so the next
  // block completes behind it and the whole pipeline must stop; after that
  // the output is ready one clock in five
  int hold_left;
  always @(posedge clk) #2 begin
    if (!random_ready) begin out_ready <= 1'b1; hold_left = 3 * NCHUNK; end
    else if (nres == 0 && out_valid && hold_left > 0) begin out_ready <= 1'b0; hold_left--; end
    else out_ready <= ($urandom % 5 == 0);
  end
  always @(posedge clk) if (rst_n && start) t_start = cyc;
  always @(posedge clk) if (rst_n && out_valid) begin
    if (!out_ready) stalls++;
    else begin
      checks++;
      if (out_block !== nres) begin failures++; $display("block index %0d exp %0d", out_block, nres); end
      for (int n = 0; n < ND; n++) begin
        automatic longint e = ref_sum(nres, n);
        checks++;
        if (out_acc[n] !== e || out_act[n] !== act(e, shift)) begin
          failures++; $display("blk %0d neuron %0d got %0d/%0d exp %0d", nres, n, out_acc[n], out_act[n], e);
        end
        if (e > 0) pos_seen++; else zero_seen++;
      end
      if (nres < NB) t_res[nres] = cyc;
      nres++;
    end
  end

  initial begin
    for (int pass = 0; pass < 2; pass++) begin
      random_ready = (pass == 1);
      nres = 0; stalls = 0;
      rst_n = 0; repeat (3) @(posedge clk); rst_n = 1; @(posedge clk); #1;
      start = 1; @(posedge clk); #1; start = 0;
      while (nres < NB) @(posedge clk);
      repeat (3) @(posedge clk);
      if (pass == 0) begin
        checks += 2;
        // out_valid rises at edge NCHUNK+3 after the edge that samples start, so
        // it is first sampled high one edge later
        if (t_res[0] - t_start != NCHUNK + 4) begin failures++; $display("latency %0d exp %0d", t_res[0] - t_start, NCHUNK + 4); end
        if (t_res[1] - t_res[0] != NCHUNK) begin failures++; $display("block spacing %0d exp %0d", t_res[1] - t_res[0], NCHUNK); end
      end else begin
        checks++;
        if (stalls == 0) begin failures++; $display("no output stall"); end
      end
      checks++;
      if (busy) begin failures++; $display("busy after completion"); end
    end
    checks++;
    if (pos_seen == 0 || zero_seen == 0) begin failures++; $display("activation cases not both seen"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
