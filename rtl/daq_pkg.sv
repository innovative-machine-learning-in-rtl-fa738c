// daq_pkg: packet format and W5500 constants of the radiation-monitor DAQ.
//
// Every ADC sample leaves the FPGA as an 80-bit packet: a 32-bit incremental
// sample counter (gaps reveal lost packets), a 32-bit timestamp counted at
// 1 MHz, and the 14-bit ADC code. The three fields and the 80-bit size are
// those of the reference design; the field order and the two zero spare bits
// are this implementation's choice. On the wire the packet is sent as 10
// bytes, most significant byte first.
//
// The W5500 constants (frame control byte layout, block selects, register
// offsets, commands and status codes) are those of the Wiznet W5500 SPI
// interface.
package daq_pkg;
  typedef struct packed {
    logic [31:0] count;      // [79:48]
    logic [31:0] tstamp;     // [47:16]
    logic [1:0]  spare;      // [15:14] always 0
    logic [13:0] sample;     // [13:0]
  } daq_packet_t;

  localparam int unsigned PKT_BYTES = 10;

  // control byte = {BSB[4:0], RWB, OM[1:0]}; OM = 00 (variable length)
  localparam logic [4:0] BSB_COMMON = 5'b00000;
  localparam logic [4:0] BSB_S0_REG = 5'b00001;
  localparam logic [4:0] BSB_S0_TX  = 5'b00010;

  // common registers
  localparam logic [15:0] W_GAR  = 16'h0001;   // gateway, 4 bytes
  localparam logic [15:0] W_SUBR = 16'h0005;   // subnet mask, 4 bytes
  localparam logic [15:0] W_SHAR = 16'h0009;   // MAC address, 6 bytes
  localparam logic [15:0] W_SIPR = 16'h000F;   // source IP, 4 bytes
  // socket registers
  localparam logic [15:0] S_MR     = 16'h0000;
  localparam logic [15:0] S_CR     = 16'h0001;
  localparam logic [15:0] S_SR     = 16'h0003;
  localparam logic [15:0] S_PORT   = 16'h0004;
  localparam logic [15:0] S_TX_FSR = 16'h0020;
  localparam logic [15:0] S_TX_WR  = 16'h0024;

  localparam logic [7:0] MR_TCP     = 8'h01;
  localparam logic [7:0] CR_OPEN    = 8'h01;
  localparam logic [7:0] CR_LISTEN  = 8'h02;
  localparam logic [7:0] CR_SEND    = 8'h20;
  localparam logic [7:0] SR_INIT    = 8'h13;
  localparam logic [7:0] SR_ESTAB   = 8'h17;

  function automatic logic [7:0] ctrl_byte(logic [4:0] bsb, logic write);
    return {bsb, write, 2'b00};
  endfunction
endpackage
