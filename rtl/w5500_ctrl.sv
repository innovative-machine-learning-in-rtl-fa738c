// w5500_ctrl: finite-state controller streaming DAQ packets into a W5500 socket.
//
// The Wiznet W5500 runs the TCP/IP stack in hardware; the FPGA only moves
// bytes over SPI. Every access is one SPI frame with chip select held low:
// a 16-bit register address, a control byte {block select, R/W, mode 00}
// and then the data bytes (variable-length mode). The controller first
// configures the chip: gateway, subnet mask, MAC and IP address, socket 0 in
// TCP mode on LOCAL_PORT, OPEN (polled until the socket reports INIT) and
// LISTEN (polled until the remote computer has connected, status
// ESTABLISHED; `established` then rises).
// Streaming loop, one pass per block of BLOCK_PKTS packets:
//   wait until the FIFO holds BLOCK_PKTS packets; read Sn_TX_FSR and repeat
//   until the socket has room for the block; read the write pointer Sn_TX_WR;
//   write the BLOCK_PKTS * 10 packet bytes into the socket TX buffer in one
//   frame starting at that pointer (each packet MSB first, popped from the
//   FIFO after its tenth byte); write back the advanced pointer; issue SEND
//   and poll Sn_CR until the chip has taken the command (reads 0);
//   `blocks_sent` then increments.
// Timing: every byte takes 16 * HALF_DIV clocks; chip select is high for 2
// clocks between frames. With the default of one packet per block a block is
// a 13-byte data frame plus 23 bytes of pointer and command traffic, about
// 1,250 clocks (12.5 us) in all, so a sample reaches the socket a few tens of
// microseconds after its conversion and up to 80,000 packets/s can be sent.
// Larger blocks cut the overhead (16 packets: about 6,350 clocks, 252,000
// packets/s) but each packet then waits for the block to fill.
// Moving the packets through W5500 socket buffers with block writes and
// pointer management follows the reference design; the server role, the
// block size (one packet, chosen to meet the 0.1 ms end-to-end latency),
// the network parameters and the order of the polls are this
// implementation's choices; the register map is the W5500's.
module w5500_ctrl #(
  parameter int unsigned BLOCK_PKTS = 1,
  parameter int unsigned HALF_DIV   = 2,
  parameter int unsigned CW         = 10,               // width of fifo_count
  parameter logic [31:0] GATEWAY    = 32'hC0A8_0101,    // 192.168.1.1
  parameter logic [31:0] SUBNET     = 32'hFFFF_FF00,
  parameter logic [47:0] MAC        = 48'h02_00_00_00_00_01,
  parameter logic [31:0] SRC_IP     = 32'hC0A8_0102,    // 192.168.1.2
  parameter logic [15:0] LOCAL_PORT = 16'd5000
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  daq_pkg::daq_packet_t fifo_rdata,
  input  logic                 fifo_empty,
  input  logic [CW-1:0]        fifo_count,
  output logic                 fifo_rd_en,
  output logic                 cs_n,
  output logic                 sclk,
  output logic                 mosi,
  input  logic                 miso,
  output logic                 established,
  output logic [31:0]          blocks_sent
);
  import daq_pkg::*;

  localparam int unsigned BLOCK_BYTES = BLOCK_PKTS * PKT_BYTES;

  typedef enum logic [3:0] {
    OP_GAR, OP_SUBR, OP_SHAR, OP_SIPR, OP_MR, OP_PORT, OP_OPEN, OP_POLL_INIT,
    OP_LISTEN, OP_POLL_EST, OP_RD_FSR, OP_RD_WR, OP_TXDATA, OP_WR_WR, OP_SEND,
    OP_POLL_CR
  } op_e;

  typedef enum logic [2:0] {ST_START, ST_FRAME, ST_WAITB, ST_END, ST_DECIDE, ST_WAIT_FIFO} st_e;

  st_e         st;
  op_e         op;
  logic [15:0] idx;          // byte index within the frame
  logic [3:0]  pbyte;        // byte index within the current packet
  logic [15:0] rd_val;       // last read data (up to 2 bytes)
  logic [15:0] tx_wr;        // socket write pointer
  logic [1:0]  gap;

  // frame descriptor
  logic [15:0] f_addr;
  logic [4:0]  f_bsb;
  logic        f_wr;
  logic [15:0] f_len;
  logic [7:0]  dbyte;        // data byte for a write frame
  logic [7:0]  tx_byte;

  always_comb begin
    f_addr = '0; f_bsb = BSB_S0_REG; f_wr = 1'b1; f_len = 16'd1;
    unique case (op)
      OP_GAR:       begin f_addr = W_GAR;   f_bsb = BSB_COMMON; f_len = 16'd4; end
      OP_SUBR:      begin f_addr = W_SUBR;  f_bsb = BSB_COMMON; f_len = 16'd4; end
      OP_SHAR:      begin f_addr = W_SHAR;  f_bsb = BSB_COMMON; f_len = 16'd6; end
      OP_SIPR:      begin f_addr = W_SIPR;  f_bsb = BSB_COMMON; f_len = 16'd4; end
      OP_MR:        f_addr = S_MR;
      OP_PORT:      begin f_addr = S_PORT;  f_len = 16'd2; end
      OP_OPEN, OP_LISTEN, OP_SEND: f_addr = S_CR;
      OP_POLL_INIT, OP_POLL_EST: begin f_addr = S_SR; f_wr = 1'b0; end
      OP_RD_FSR:    begin f_addr = S_TX_FSR; f_wr = 1'b0; f_len = 16'd2; end
      OP_RD_WR:     begin f_addr = S_TX_WR;  f_wr = 1'b0; f_len = 16'd2; end
      OP_TXDATA:    begin f_addr = tx_wr;    f_bsb = BSB_S0_TX; f_len = 16'(BLOCK_BYTES); end
      OP_WR_WR:     begin f_addr = S_TX_WR;  f_len = 16'd2; end
      OP_POLL_CR:   begin f_addr = S_CR;     f_wr = 1'b0; end
      default: ;
    endcase
  end

  // data byte number k = idx - 3 of a write frame
  always_comb begin
    logic [15:0] k;
    logic [15:0] new_wr;
    k      = idx - 16'd3;
    new_wr = tx_wr + 16'(BLOCK_BYTES);
    dbyte  = 8'h00;
    unique case (op)
      OP_GAR:    dbyte = GATEWAY[8*(3 - k[1:0]) +: 8];
      OP_SUBR:   dbyte = SUBNET[8*(3 - k[1:0]) +: 8];
      OP_SIPR:   dbyte = SRC_IP[8*(3 - k[1:0]) +: 8];
      OP_SHAR:   dbyte = MAC[8*(5 - k[2:0]) +: 8];
      OP_MR:     dbyte = MR_TCP;
      OP_PORT:   dbyte = k[0] ? LOCAL_PORT[7:0] : LOCAL_PORT[15:8];
      OP_OPEN:   dbyte = CR_OPEN;
      OP_LISTEN: dbyte = CR_LISTEN;
      OP_SEND:   dbyte = CR_SEND;
      OP_WR_WR:  dbyte = k[0] ? new_wr[7:0] : new_wr[15:8];
      OP_TXDATA: dbyte = fifo_rdata[8*(9 - pbyte) +: 8];
      default:   dbyte = 8'h00;
    endcase
    unique case (idx)
      16'd0:   tx_byte = f_addr[15:8];
      16'd1:   tx_byte = f_addr[7:0];
      16'd2:   tx_byte = ctrl_byte(f_bsb, f_wr);
      default: tx_byte = f_wr ? dbyte : 8'h00;
    endcase
  end

  logic       b_start, b_busy, b_done;
  logic [7:0] b_rx;

  spi_byte_master #(.HALF_DIV(HALF_DIV)) u_spi (
    .clk, .rst_n, .start(b_start), .tx_byte, .busy(b_busy), .done(b_done),
    .rx_byte(b_rx), .sclk, .mosi, .miso);

  assign b_start = (st == ST_FRAME);

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      st          <= ST_START;
      op          <= OP_GAR;
      idx         <= '0;
      pbyte       <= '0;
      rd_val      <= '0;
      tx_wr       <= '0;
      gap         <= '0;
      cs_n        <= 1'b1;
      fifo_rd_en  <= 1'b0;
      established <= 1'b0;
      blocks_sent <= '0;
    end else begin
      fifo_rd_en <= 1'b0;
      unique case (st)
        ST_START: begin            // chip select high gap, then open frame
          gap <= gap + 1'b1;
          if (gap == 2'd1) begin
            cs_n  <= 1'b0;
            idx   <= '0;
            pbyte <= '0;
            st    <= ST_FRAME;
          end
        end
        ST_FRAME: st <= ST_WAITB;  // byte started this clock
        ST_WAITB: if (b_done) begin
          if (!f_wr && idx >= 16'd3) rd_val <= {rd_val[7:0], b_rx};
          if (op == OP_TXDATA && idx >= 16'd3) begin
            if (pbyte == 4'd9) begin
              pbyte      <= '0;
              fifo_rd_en <= 1'b1;
            end else begin
              pbyte <= pbyte + 1'b1;
            end
          end
          if (idx == f_len + 16'd2) begin
            st <= ST_END;
          end else begin
            idx <= idx + 1'b1;
            st  <= ST_FRAME;
          end
        end
        ST_END: begin
          cs_n <= 1'b1;
          gap  <= '0;
          st   <= ST_DECIDE;
        end
        ST_DECIDE: begin
          st <= ST_START;
          unique case (op)
            OP_GAR:       op <= OP_SUBR;
            OP_SUBR:      op <= OP_SHAR;
            OP_SHAR:      op <= OP_SIPR;
            OP_SIPR:      op <= OP_MR;
            OP_MR:        op <= OP_PORT;
            OP_PORT:      op <= OP_OPEN;
            OP_OPEN:      op <= OP_POLL_INIT;
            OP_POLL_INIT: op <= (rd_val[7:0] == SR_INIT) ? OP_LISTEN : OP_POLL_INIT;
            OP_LISTEN:    op <= OP_POLL_EST;
            OP_POLL_EST:  if (rd_val[7:0] == SR_ESTAB) begin
                            established <= 1'b1;
                            st          <= ST_WAIT_FIFO;
                          end
            OP_RD_FSR:    op <= (rd_val >= 16'(BLOCK_BYTES)) ? OP_RD_WR : OP_RD_FSR;
            OP_RD_WR:     begin tx_wr <= rd_val; op <= OP_TXDATA; end
            OP_TXDATA:    op <= OP_WR_WR;
            OP_WR_WR:     begin tx_wr <= tx_wr + 16'(BLOCK_BYTES); op <= OP_SEND; end
            OP_SEND:      op <= OP_POLL_CR;
            OP_POLL_CR:   if (rd_val[7:0] == 8'h00) begin
                            blocks_sent <= blocks_sent + 1;
                            st          <= ST_WAIT_FIFO;
                          end
            default:      op <= OP_GAR;
          endcase
        end
        ST_WAIT_FIFO: if (fifo_count >= CW'(BLOCK_PKTS)) begin
          op <= OP_RD_FSR;
          st <= ST_START;
        end
        default: st <= ST_START;
      endcase
    end
  end

  // a packet byte is only sent while the FIFO holds that packet
  assert property (@(posedge clk) disable iff (!rst_n)
    (st == ST_FRAME && op == OP_TXDATA && idx >= 16'd3) |-> !fifo_empty);
  assert property (@(posedge clk) disable iff (!rst_n) b_start |-> !b_busy);
endmodule
