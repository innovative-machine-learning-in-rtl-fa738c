// tb_l1_feeder: small configuration (37 inputs, 8-input chunks, 3 neurons,
// 2 blocks) fed from a registered RAM model whose contents are a formula of
// the address. Checks every beat's inputs (with zero padding of the partial
// last chunk), weights, last flag and block index, in order; checks that with
// a ready consumer one beat leaves per clock; then repeats with random
// back-pressure and checks that nothing is lost or duplicated.
module tb_l1_feeder;
  timeunit 1ns; timeprecision 1ps;
  localparam int N_INPUTS = 37, N = 8, N_DSP = 3, N_BLOCKS = 2;
  localparam int NCHUNK = (N_INPUTS + N - 1) / N;
  logic clk = 0, rst_n = 0, start = 0, busy, rd_en, m_valid, m_ready = 0, m_last;
  logic [31:0] in_addr, w_addr, m_block;
  l1_pkg::q8_t in_data [N], w_data [N_DSP][N], m_x [N], m_w [N_DSP][N];
  int checks = 0, failures = 0;

  l1_feeder #(.N_INPUTS(N_INPUTS), .N(N), .N_DSP(N_DSP), .N_BLOCKS(N_BLOCKS)) dut (.*);
  always #5 clk = ~clk;

  function automatic l1_pkg::q8_t xin(int a, int l);  return l1_pkg::q8_t'(a * 7 + l * 3 + 1); endfunction
  function automatic l1_pkg::q8_t win(int r, int n, int l); return l1_pkg::q8_t'(r * 11 + n * 5 - l); endfunction

  // RAM with one-clock read latency
  always_ff @(posedge clk) if (rd_en) begin
    for (int l = 0; l < N; l++) in_data[l] <= xin(in_addr, l);
    for (int n = 0; n < N_DSP; n++) for (int l = 0; l < N; l++) w_data[n][l] <= win(w_addr, n, l);
  end

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int beat, first_t, last_t, cyc;
  bit random_ready;
  always_ff @(posedge clk) cyc <= cyc + 1;

  always @(posedge clk) if (rst_n && m_valid && m_ready) begin
    automatic int blk = beat / NCHUNK, ch = beat % NCHUNK;
    automatic bit ok = 1;
    for (int l = 0; l < N; l++) begin
      automatic l1_pkg::q8_t ex = (ch * N + l < N_INPUTS) ? xin(ch, l) : 8'sd0;
      if (m_x[l] !== ex) ok = 0;
      for (int n = 0; n < N_DSP; n++) if (m_w[n][l] !== win(blk * NCHUNK + ch, n, l)) ok = 0;
    end
    if (m_last !== (ch == NCHUNK - 1) || m_block !== blk) ok = 0;
    checks++;
    if (!ok) begin failures++; $display("beat %0d wrong", beat); end
    if (beat == 0) first_t = cyc;
    last_t = cyc;
    beat++;
  end

  always @(negedge clk) m_ready <= random_ready ? ($urandom % 3 != 0) : 1'b1;

  initial begin
    for (int pass = 0; pass < 2; pass++) begin
      random_ready = (pass == 1);
      beat = 0;
      rst_n = 0;
      repeat (3) @(posedge clk);
      rst_n = 1;
      @(posedge clk);
      start = 1; @(posedge clk); start = 0;
      while (busy) @(posedge clk);
      repeat (3) @(posedge clk);
      checks++;
      if (beat != NCHUNK * N_BLOCKS) begin failures++; $display("pass %0d beats=%0d", pass, beat); end
      if (pass == 0) begin
        checks++;
        if (last_t - first_t != NCHUNK * N_BLOCKS - 1) begin
          failures++; $display("rate: %0d clocks for %0d beats", last_t - first_t + 1, beat);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
