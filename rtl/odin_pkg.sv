// odin_pkg: types, constants and functions shared by the ODIN optical S-LINK
// protocol chips (Link Source Card, LSC, and Link Destination Card, LDC).
//
// The link carries the 33-bit S-LINK word (32 data bits plus a control flag)
// over one or two 16-bit G-Link serializer channels in the forward direction and
// one G-Link channel in the return direction.  Each G-Link parallel word carries
// 16 bits, a flag bit and two strobes: TX_DATA (data frame) and TX_CNTL (G-Link
// control frame).  This package holds:
//   * glink_word_t / slink_word_t, the two word formats;
//   * the internal command codes sent as G-Link control frames (CRCC, TON,
//     TOFF, RLDWN, RRES) and the return-channel bit map (each bit doubled);
//   * even parity for S-LINK control words (LD[3:0] protect LD[31:4] in four
//     7-bit groups);
//   * the CRC-CCITT (x^16+x^12+x^5+1) update for a whole 16-bit word at once,
//     written as the sixteen XOR equations of the classic 16-bit look-ahead
//     (register R, data D, data bit 0 shifted first).  In that form the register
//     is the bit-reverse of a right-shifting LFSR, so the checksum word appended
//     to the stream is bit-reverse(R); folding that word into R again gives 0.
// Codes, parity groups, polynomial and preset value follow the ODIN
// specification; the struct layouts are this implementation's own.
package odin_pkg;

  // One G-Link parallel word (HDMP-1032 transmitter / HDMP-1034 receiver side).
  typedef struct packed {
    logic        dav;   // TX_DATA / RX_DATA: a data frame is sent
    logic        cav;   // TX_CNTL / RX_CNTL: a G-Link control frame is sent
    logic        flag;  // flag bit: high for data words and CRC checksum
    logic [15:0] d;     // data field
  } glink_word_t;

  // One S-LINK word as written by the user (UCTRL# inverted to ctrl).
  typedef struct packed {
    logic        ctrl;
    logic [31:0] d;
  } slink_word_t;

  localparam glink_word_t GLINK_IDLE = '{dav: 1'b0, cav: 1'b0, flag: 1'b0, d: 16'h0000};

  // Internal commands, bits [9:0] of a G-Link control frame.
  typedef enum logic [9:0] {
    CMD_CRCC  = 10'b0000000011,  // next word is a CRC checksum
    CMD_TON   = 10'b0000001100,  // test mode on
    CMD_TOFF  = 10'b0000110000,  // test mode off
    CMD_RLDWN = 10'b0011000000,  // LSC down
    CMD_RRES  = 10'b1100000000   // remote reset
  } odin_cmd_e;

  // Return channel: one word, then seven idles.  Field map (each bit doubled):
  // [7:0] return lines 3..0, [9:8] XOFF, [11:10] LDC down, [13:12] remote reset.
  localparam int RC_WORD_PERIOD = 8;

  // Requests from the LSC router to a channel encoder.
  typedef enum logic [1:0] {
    REQ_DATA = 2'd0,  // S-LINK data word (two flagged halves)
    REQ_CTRL = 2'd1,  // S-LINK control word with parity (two unflagged halves)
    REQ_CRC  = 2'd2,  // CRCC command followed by the checksum word
    REQ_CMD  = 2'd3   // one internal command frame
  } tx_req_e;

  // Power-up / reset state machines of the two cards.
  typedef enum logic [1:0] {
    LSC_POWER = 2'd0, LSC_RESET = 2'd1, LSC_UP = 2'd2, LSC_DOWN = 2'd3
  } lsc_state_e;

  typedef enum logic [1:0] {
    LDC_POWER_DOWN = 2'd0, LDC_RES1 = 2'd1, LDC_RES24 = 2'd2, LDC_UP = 2'd3
  } ldc_state_e;

  localparam logic [15:0] CRC_INIT = 16'hFFFF;

  function automatic logic [3:0] cw_parity(input logic [31:0] w);
    cw_parity[3] = ^w[31:25];
    cw_parity[2] = ^w[24:18];
    cw_parity[1] = ^w[17:11];
    cw_parity[0] = ^w[10:4];
  endfunction

  function automatic logic [15:0] bitrev16(input logic [15:0] v);
    for (int i = 0; i < 16; i++) bitrev16[i] = v[15-i];
  endfunction

  // 16-bit look-ahead of CRC-CCITT: register after folding in data word D.
  function automatic logic [15:0] crc16_next(input logic [15:0] R, input logic [15:0] D);
    logic [15:0] n;
    n[0]  = R[0]^R[4]^R[8]^R[11]^R[12] ^ D[3]^D[4]^D[7]^D[11]^D[15];
    n[1]  = R[1]^R[5]^R[9]^R[12]^R[13] ^ D[2]^D[3]^D[6]^D[10]^D[14];
    n[2]  = R[2]^R[6]^R[10]^R[13]^R[14] ^ D[1]^D[2]^D[5]^D[9]^D[13];
    n[3]  = R[3]^R[7]^R[11]^R[14]^R[15] ^ D[0]^D[1]^D[4]^D[8]^D[12];
    n[4]  = R[4]^R[8]^R[12]^R[15] ^ D[0]^D[3]^D[7]^D[11];
    n[5]  = R[0]^R[4]^R[5]^R[8]^R[9]^R[11]^R[12]^R[13]
          ^ D[2]^D[3]^D[4]^D[6]^D[7]^D[10]^D[11]^D[15];
    n[6]  = R[1]^R[5]^R[6]^R[9]^R[10]^R[12]^R[13]^R[14]
          ^ D[1]^D[2]^D[3]^D[5]^D[6]^D[9]^D[10]^D[14];
    n[7]  = R[2]^R[6]^R[7]^R[10]^R[11]^R[13]^R[14]^R[15]
          ^ D[0]^D[1]^D[2]^D[4]^D[5]^D[8]^D[9]^D[13];
    n[8]  = R[3]^R[7]^R[8]^R[11]^R[12]^R[14]^R[15]
          ^ D[0]^D[1]^D[3]^D[4]^D[7]^D[8]^D[12];
    n[9]  = R[4]^R[8]^R[9]^R[12]^R[13]^R[15] ^ D[0]^D[2]^D[3]^D[6]^D[7]^D[11];
    n[10] = R[5]^R[9]^R[10]^R[13]^R[14] ^ D[1]^D[2]^D[5]^D[6]^D[10];
    n[11] = R[6]^R[10]^R[11]^R[14]^R[15] ^ D[0]^D[1]^D[4]^D[5]^D[9];
    n[12] = R[0]^R[4]^R[7]^R[8]^R[15] ^ D[0]^D[7]^D[8]^D[11]^D[15];
    n[13] = R[1]^R[5]^R[8]^R[9] ^ D[6]^D[7]^D[10]^D[14];
    n[14] = R[2]^R[6]^R[9]^R[10] ^ D[5]^D[6]^D[9]^D[13];
    n[15] = R[3]^R[7]^R[10]^R[11] ^ D[4]^D[5]^D[8]^D[12];
    return n;
  endfunction

endpackage
