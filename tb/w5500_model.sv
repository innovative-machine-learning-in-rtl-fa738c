// w5500_model: behavioural model of the Wiznet W5500 SPI side, socket 0 only
// (testbench only, not hardware of the design).
//
// SPI mode 0: `mosi` is taken on rising `sclk`, `miso` changes after falling
// edges. A frame (cs_n low) is a 16-bit address, a control byte {BSB, RWB,
// OM} and data bytes at consecutive addresses. Modelled blocks: common
// registers (BSB 0), socket 0 registers (BSB 1) and a 2 KB socket 0 TX buffer
// (BSB 2, address taken modulo 2048). Socket behaviour:
//   CR = OPEN with MR = TCP  -> SR = 0x13 (INIT), CR clears after CR_DELAY;
//   CR = LISTEN              -> SR = 0x14, then 0x17 (ESTABLISHED) after
//                               EST_DELAY (the remote computer connects);
//   CR = SEND                -> the bytes between the last sent position and
//                               TX_WR are appended to `stream` and CR clears
//                               after CR_DELAY; the buffer space is freed
//                               (TX_RD advances) DRAIN_DELAY later, or not
//                               before `hold_drain` is released, which
//                               models a slow network.
// `send_t`/`send_end` record the time of each SEND and the stream length
// after it. TX_FSR reads 2048 - (sent position - TX_RD); `fsr_reads` counts frames
// reading it. `frames` counts frames and
// `errors` counts protocol errors (OM != 00, SEND without data, SEND of
// more than the free space, data written beyond the free space).
module w5500_model #(
  parameter time CR_DELAY    = 300ns,
  parameter time EST_DELAY   = 20us,
  parameter time DRAIN_DELAY = 50us
) (
  input  logic cs_n,
  input  logic sclk,
  input  logic mosi,
  output logic miso,
  input  logic hold_drain
);
  timeunit 1ns; timeprecision 1ps;
  logic [7:0]  common [64];
  logic [7:0]  sock   [64];
  logic [7:0]  txbuf  [2048];
  logic [15:0] tx_rd = 0, sent_pos = 0;
  logic [7:0]  stream [$];
  time         send_t [$];    // time of each SEND
  int          send_end [$];  // stream size after each SEND
  int frames = 0, errors = 0, sends = 0, fsr_reads = 0;

  logic [7:0]  rx, out;
  int          nbit, nbyte;
  logic [15:0] addr;
  logic [7:0]  ctrl;
  initial begin
    foreach (common[i]) common[i] = 0;
    foreach (sock[i]) sock[i] = 0;
    foreach (txbuf[i]) txbuf[i] = 0;
    miso = 0; nbit = 0; nbyte = 0;
  end

  function automatic logic [15:0] fsr();
    return 16'd2048 - (sent_pos - tx_rd);
  endfunction
  function automatic logic [15:0] tx_wr();
    return {sock[8'h24], sock[8'h25]};
  endfunction

  function automatic logic [7:0] rd_byte(logic [4:0] bsb, logic [15:0] a);
    logic [15:0] f = fsr();
    if (bsb == 5'd0) return common[a[5:0]];
    if (bsb == 5'd1) begin
      if (a == 16'h20) return f[15:8];
      if (a == 16'h21) return f[7:0];
      if (a == 16'h22) return tx_rd[15:8];
      if (a == 16'h23) return tx_rd[7:0];
      return sock[a[5:0]];
    end
    if (bsb == 5'd2) return txbuf[a[10:0]];
    return 8'h00;
  endfunction

  task automatic command(logic [7:0] c);
    logic [15:0] from, to;
    case (c)
      8'h01: begin if (sock[0][3:0] == 4'h1) sock[3] = 8'h13; end
      8'h02: begin
        if (sock[3] != 8'h13) errors++;
        sock[3] = 8'h14;
        fork begin #EST_DELAY; sock[3] = 8'h17; end join_none
      end
      8'h20: begin
        from = sent_pos; to = tx_wr();
        if (to == from || 16'(to - tx_rd) > 16'd2048) errors++;
        for (logic [15:0] p = from; p != to; p++) stream.push_back(txbuf[p[10:0]]);
        sent_pos = to; sends++;
        send_t.push_back($time); send_end.push_back(stream.size());
        fork begin
          #DRAIN_DELAY;
          wait (!hold_drain);
          if (16'(sent_pos - to) < 16'(sent_pos - tx_rd)) tx_rd = to;   // forks may wake out of order
        end join_none
      end
      default: ;
    endcase
    fork begin #CR_DELAY; sock[1] = 8'h00; end join_none
  endtask

  always @(negedge cs_n) begin nbit = 0; nbyte = 0; miso = 0; end
  always @(posedge cs_n) if (nbyte > 0) frames++;

  always @(posedge sclk) if (!cs_n) begin
    rx = {rx[6:0], mosi};
    nbit++;
    if (nbit == 8) begin
      nbit = 0;
      if (nbyte == 0) addr[15:8] = rx;
      else if (nbyte == 1) addr[7:0] = rx;
      else if (nbyte == 2) begin
        ctrl = rx;
        if (ctrl[1:0] != 2'b00) errors++;
        if (!ctrl[2] && ctrl[7:3] == 5'd1 && addr == 16'h20) fsr_reads++;
      end else begin
        automatic logic [15:0] a = addr + 16'(nbyte - 3);
        if (ctrl[2]) begin
          if (ctrl[7:3] == 5'd0) common[a[5:0]] = rx;
          else if (ctrl[7:3] == 5'd1) begin
            sock[a[5:0]] = rx;
            if (a == 16'h01) command(rx);
          end else if (ctrl[7:3] == 5'd2) begin
            if (16'(a - tx_rd) >= 16'd2048) errors++;
            txbuf[a[10:0]] = rx;
          end
        end
      end
      nbyte++;
      // next byte to shift out for a read frame
      out = (nbyte >= 3 && !ctrl[2]) ? rd_byte(ctrl[7:3], addr + 16'(nbyte - 3)) : 8'h00;
    end
  end
  always @(negedge sclk) if (!cs_n) begin
    if (nbit == 0) miso = out[7];
    else miso = out[7 - nbit];
  end
endmodule
