// tb_spi_byte_master: SPI mode-0 byte shifter against an inline slave.
// The slave captures mosi on rising SCLK and shifts its own byte out after
// falling edges (first bit present before the first rising edge). For random
// bytes both directions must match, `done` must rise exactly 32 clocks (16 *
// HALF_DIV) after the edge that samples start, and a start while busy must be ignored.
module tb_spi_byte_master;
  timeunit 1ns; timeprecision 1ps;
  logic clk = 0, rst_n = 0, start = 0, busy, done, sclk, mosi, miso;
  logic [7:0] tx_byte, rx_byte;
  logic [7:0] s_tx, s_rx;
  int checks = 0, failures = 0, cyc = 0, t_start, t_done;
  spi_byte_master dut (.*);
  always #5 clk = ~clk;
  // start and done are sampled on the same edges, so a pulse rising N clocks
  // after the start edge is seen N + 1 edges later
  always @(posedge clk) begin
    cyc++;
    if (start && !busy) t_start = cyc;
    if (done) t_done = cyc;
  end
  always @(posedge sclk) s_rx = {s_rx[6:0], mosi};
  always @(negedge sclk) begin s_tx = {s_tx[6:0], 1'b0}; miso = s_tx[7]; end
  initial begin
    #1_000_000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    logic [7:0] st;
    repeat (3) @(posedge clk); #1 rst_n = 1;
    for (int i = 0; i < 300; i++) begin
      repeat ($urandom_range(0, 3)) @(posedge clk);
      #1 tx_byte = $urandom; st = $urandom; s_tx = st; miso = st[7];
      start = 1; @(posedge clk); #1 start = 0;
      if (i % 5 == 2) begin repeat (9) @(posedge clk); #1 start = 1; tx_byte = ~tx_byte; @(posedge clk); #1 start = 0; tx_byte = ~tx_byte; end
      while (!done) @(posedge clk);
      @(negedge clk);
      checks += 3;
      if (rx_byte !== st) begin failures++; $display("master got %h exp %h", rx_byte, st); end
      if (s_rx !== tx_byte) begin failures++; $display("slave got %h exp %h", s_rx, tx_byte); end
      if (t_done - t_start != 33) begin failures++; $display("byte took %0d clocks", t_done - t_start); end
      checks++;
      if (busy || sclk) begin failures++; $display("not idle after done"); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
