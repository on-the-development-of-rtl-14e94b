// omb_pkg: types, constants and the CRC function shared by the Optical
// Multiplexer Board (OMB) logic.
//
// The board receives every front-end channel twice, on two optical fibres,
// as 16-bit words at 40 MHz. A word stream is carried as stream_t: a valid
// flag, start/end-of-packet flags and the 16-bit word. The last word of a
// packet is its CRC. The CRC is CRC-16-CCITT (x^16+x^12+x^5+1, initial value
// 0xFFFF, most significant bit first, no final inversion); the polynomial and
// the framing are this design's choice, the board only requires that the
// CRC carried in the data is recomputed and compared.
//
// The register offsets of the CRC FPGA (reached over the serial control bus)
// and of the VME control FPGA are also defined here.
package omb_pkg;

  localparam int unsigned WORD_W = 16;

  typedef logic [WORD_W-1:0] word_t;

  typedef struct packed {
    logic  valid;
    logic  sop;
    logic  eop;
    word_t data;
  } stream_t;

  localparam logic [15:0] CRC_POLY = 16'h1021;
  localparam logic [15:0] CRC_INIT = 16'hFFFF;

  // One 16-bit word folded into the running CRC, MSB first.
  function automatic logic [15:0] crc16_word(input logic [15:0] crc,
                                             input logic [15:0] data,
                                             input logic [15:0] poly = CRC_POLY);
    logic [15:0] c;
    c = crc;
    for (int i = 15; i >= 0; i--) begin
      if (c[15] ^ data[i]) c = (c << 1) ^ poly;
      else                 c = c << 1;
    end
    return c;
  endfunction

  // Serial control bus frame: a start clock, a header of rw (1 = read),
  // slot and register address, then 32 data bits on a write.
  localparam int unsigned SB_SLOT_W = 4;
  localparam int unsigned SB_ADDR_W = 11;
  localparam int unsigned SB_HDR_W  = 1 + SB_SLOT_W + SB_ADDR_W;  // 16
  localparam int unsigned SB_LINES  = 3;   // data lines on the board
  localparam int unsigned SB_TURN   = 2;   // idle bus clocks before a reply

  // CRC FPGA register offsets (serial bus addresses)
  localparam logic [SB_ADDR_W-1:0] R_CTRL    = 11'h000;
  localparam logic [SB_ADDR_W-1:0] R_EVLEN   = 11'h001;
  localparam logic [SB_ADDR_W-1:0] R_ERR_A   = 11'h002;
  localparam logic [SB_ADDR_W-1:0] R_ERR_B   = 11'h003;
  localparam logic [SB_ADDR_W-1:0] R_PKTS    = 11'h004;
  localparam logic [SB_ADDR_W-1:0] R_BOTHBAD = 11'h005;
  localparam logic [SB_ADDR_W-1:0] R_TMO     = 11'h006;
  localparam logic [SB_ADDR_W-1:0] R_SELB    = 11'h007;
  localparam logic [SB_ADDR_W-1:0] R_EVMEM   = 11'h400;  // 0x400..0x7FF

  // VME control FPGA local register offsets (A[7:0])
  localparam logic [7:0] V_ID       = 8'h00;
  localparam logic [7:0] V_TRIGCTRL = 8'h04;
  localparam logic [7:0] V_PERIOD   = 8'h08;
  localparam logic [7:0] V_SWTRIG   = 8'h0C;
  localparam logic [7:0] V_RESET    = 8'h10;
  localparam logic [7:0] V_TRIGCNT  = 8'h14;
  localparam logic [7:0] V_VETOCNT  = 8'h18;
  localparam logic [7:0] V_SBERR    = 8'h1C;
  localparam logic [31:0] OMB_ID    = 32'h04D8_0009;

  // Default injection event held in the CRC FPGA firmware: 15 data words
  // 0xA000+i followed by their CRC.
  localparam int unsigned DEF_EVLEN = 16;

endpackage
