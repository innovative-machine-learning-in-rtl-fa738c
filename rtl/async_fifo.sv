// async_fifo: dual-clock FIFO between the acquisition and transmission domains.
//
// Packets are written in the acquisition clock domain and read in the
// Ethernet-controller domain. Each side keeps a binary pointer one bit wider
// than the address and publishes it Gray-coded; the other side brings it in
// through a two-flop synchroniser. `full` and `empty` are computed from the
// local pointer and the synchronised remote pointer, so they are pessimistic
// by the synchroniser delay but never wrong. The read side is show-ahead:
// `rdata` is the head entry whenever `empty` is low, and `rd_en` pops it.
// `rcount` is the fill level seen from the read side (also pessimistic).
// Writes to a full FIFO and reads from an empty one are ignored, and are
// flagged by assertions.
// Timing: a written entry becomes visible to the reader 2-3 read clocks later.
// DEPTH must be a power of two. The dual-clock FIFO follows the reference
// design; the depth of 512 and the Gray-pointer scheme are this
// implementation's choices.
module async_fifo #(
  parameter int unsigned WIDTH = 80,
  parameter int unsigned DEPTH = 512
) (
  input  logic                   wclk,
  input  logic                   wrst_n,
  input  logic                   wr_en,
  input  logic [WIDTH-1:0]       wdata,
  output logic                   full,
  input  logic                   rclk,
  input  logic                   rrst_n,
  input  logic                   rd_en,
  output logic [WIDTH-1:0]       rdata,
  output logic                   empty,
  output logic [$clog2(DEPTH):0] rcount
);
  localparam int unsigned AW = $clog2(DEPTH);

  logic [WIDTH-1:0] mem [DEPTH];
  logic [AW:0] wbin, wgray, rbin, rgray;
  logic [AW:0] rgray_w1, rgray_w2;   // read pointer in write domain
  logic [AW:0] wgray_r1, wgray_r2;   // write pointer in read domain
  logic [AW:0] wbin_r;

  function automatic logic [AW:0] bin2gray(logic [AW:0] b);
    return b ^ (b >> 1);
  endfunction
  function automatic logic [AW:0] gray2bin(logic [AW:0] g);
    logic [AW:0] b;
    b[AW] = g[AW];
    for (int i = int'(AW) - 1; i >= 0; i--) b[i] = b[i+1] ^ g[i];
    return b;
  endfunction

  // write domain
  assign full = (wgray == {~rgray_w2[AW:AW-1], rgray_w2[AW-2:0]});
  always_ff @(posedge wclk) begin
    if (!wrst_n) begin
      wbin     <= '0;
      wgray    <= '0;
      rgray_w1 <= '0;
      rgray_w2 <= '0;
    end else begin
      rgray_w1 <= rgray;
      rgray_w2 <= rgray_w1;
      if (wr_en && !full) begin
        wbin  <= wbin + 1'b1;
        wgray <= bin2gray(wbin + 1'b1);
      end
    end
  end
  always_ff @(posedge wclk) begin
    if (wr_en && !full) mem[wbin[AW-1:0]] <= wdata;
  end

  // read domain
  assign empty  = (rgray == wgray_r2);
  assign wbin_r = gray2bin(wgray_r2);
  assign rcount = wbin_r - rbin;
  assign rdata  = mem[rbin[AW-1:0]];
  always_ff @(posedge rclk) begin
    if (!rrst_n) begin
      rbin     <= '0;
      rgray    <= '0;
      wgray_r1 <= '0;
      wgray_r2 <= '0;
    end else begin
      wgray_r1 <= wgray;
      wgray_r2 <= wgray_r1;
      if (rd_en && !empty) begin
        rbin  <= rbin + 1'b1;
        rgray <= bin2gray(rbin + 1'b1);
      end
    end
  end

  assert property (@(posedge wclk) disable iff (!wrst_n) !(wr_en && full))
    else $error("async_fifo: write while full");
  assert property (@(posedge rclk) disable iff (!rrst_n) !(rd_en && empty))
    else $error("async_fifo: read while empty");
endmodule
