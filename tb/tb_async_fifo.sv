// tb_async_fifo: dual-clock FIFO at its default size (512 x 80 bits).
// The write clock runs at 100 MHz and the read clock at about 73 MHz (not
// related), with random write and read enables. A scoreboard queue checks
// that every accepted word comes out once and in order (the enables are
// only raised when the flags allow it, as the FIFO's assertions require) and
// that rcount never exceeds the true fill level or DEPTH. Phases with no
// reads and with no writes make the FIFO reach full and then empty; the test
// fails if either never happened.
module tb_async_fifo;
  timeunit 1ns; timeprecision 1ps;
  localparam int W = 80, D = 512;
  logic wclk = 0, rclk = 0, wrst_n = 0, rrst_n = 0, wr_en = 0, rd_en = 0, full, empty;
  logic [W-1:0] wdata = '0, rdata;
  logic [$clog2(D):0] rcount;
  int checks = 0, failures = 0;
  async_fifo #(.WIDTH(W), .DEPTH(D)) dut (.*);
  always #5 wclk = ~wclk;
  always #6.8 rclk = ~rclk;
  logic [W-1:0] q [$];
  int wr_pct = 50, rd_pct = 50, nfull = 0, nempty = 0, nread = 0;
  initial begin
    #5_000_000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  // write side
  always @(posedge wclk) if (wrst_n) begin
    if (wr_en && !full) q.push_back(wdata);
    if (full) nfull++;
    #1;
    wr_en = (($urandom % 100) < wr_pct) && !full;
    wdata = {$urandom, $urandom, 16'($urandom)};
  end
  // read side (show-ahead: rdata is the head while !empty)
  always @(posedge rclk) if (rrst_n) begin
    checks++;
    if (rcount > q.size() || rcount > D) begin failures++; $display("rcount %0d above fill %0d", rcount, q.size()); end
    if (rd_en && !empty) begin
      checks++;
      if (q.size() == 0) begin failures++; $display("read from an empty model"); end
      else begin
        automatic logic [W-1:0] e = q.pop_front();
        if (rdata !== e) begin failures++; $display("rdata %h exp %h", rdata, e); end
      end
      nread++;
    end
    if (empty) nempty++;
    #1;
    rd_en = (($urandom % 100) < rd_pct) && !empty;
  end
  initial begin
    #23 wrst_n = 1; rrst_n = 1;
    #20_000;
    wr_pct = 90; rd_pct = 0; #20_000;                 // fill up
    checks++; if (!full || q.size() != D) begin failures++; $display("not full: %0d", q.size()); end
    wr_pct = 60; rd_pct = 70; #100_000;
    wr_pct = 0; rd_pct = 90; #20_000;                 // drain
    checks++; if (!empty || q.size() != 0) begin failures++; $display("not empty: %0d", q.size()); end
    wr_pct = 50; rd_pct = 50; #100_000;
    checks++; if (nfull == 0 || nempty == 0 || nread < 1000) begin failures++; $display("coverage full %0d empty %0d reads %0d", nfull, nempty, nread); end
    $display("reads %0d", nread);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
