// odin_lsc: protocol chip of the ODIN Link Source Card (LSC).
//
// The LSC takes 33-bit S-LINK words from the front-end motherboard (FEMB) and
// sends them over CHANNELS forward G-Link channels (2 in the double version,
// 160 Mbyte/s at 40 MHz; 1 in the single version, 128 Mbyte/s at 64 MHz).  It
// receives flow control, the four return lines and link status from the LDC
// over one return G-Link channel.
//
// Data path:  UD/UCTRL#/UWEN# --(UCLK)--> async_fifo --(XCLK)--> lsc_router
//             --> glink_tx_encoder x CHANNELS --> G-Link transmitters
// Control:    return G-Link receiver --(return RXCLK)--> rc_decoder
//             --> synchronisers --> lsc_fsm, lsc_router (XCLK)
//             G-Link lock/ready pins --> hp_up_filter --> lsc_fsm
//
// Clock domains: UCLK (user, up to 40 MHz), XCLK (on-board transmit
// oscillator; all protocol logic), rc_rxclk (recovered return clock).  Only
// independent level signals cross from rc_rxclk to XCLK, so plain two-flop
// synchronisers suffice (the return lines see the note below).  por_n is the card's power-on reset and resets all
// three domains asynchronously.
//
// User-side signals keep their S-LINK names and active-low polarity:
//   LFF#   low when the FIFO has two or fewer free entries (the user may still
//          write two words); writes into a full FIFO are ignored
//   LDOWN# low while the link is not up or in self-test mode
//   LRL    return lines from the LDC, updated only while the link is up
//          (registered on XCLK); they keep their value while it is down and
//          while no valid return word arrives.  The four lines are slow
//          levels synchronised bit by bit, so during a change they may
//          differ for one XCLK cycle.
// led_* are the front-panel indicators (test, up, XOFF).
// The structure follows ODIN; LDOWN#, LFF# and the reset counter run from XCLK
// and UCLK as noted in the sub-blocks.
module odin_lsc
  import odin_pkg::*;
#(
  parameter int CHANNELS     = 2,
  parameter int FIFO_DEPTH   = 8,
  parameter int CRC_WORDS    = 1024,
  parameter int HP_CNT_BITS  = 21,
  parameter int RESET_CYCLES = 4
) (
  input  logic                       por_n,
  // S-LINK user side (FEMB)
  input  logic                       uclk,
  input  logic                       ureset_n,
  input  logic                       uwen_n,
  input  logic                       uctrl_n,
  input  logic [31:0]                ud,
  input  logic                       utdo_n,
  output logic                       lff_n,
  output logic                       ldown_n,
  output logic [3:0]                 lrl,
  // forward G-Link transmitters
  input  logic                       xclk,
  output glink_word_t [CHANNELS-1:0] fwd_tx,
  input  logic        [CHANNELS-1:0] fwd_tx_locked,
  // return G-Link receiver
  input  logic                       rc_rxclk,
  input  glink_word_t                rc_rx,
  input  logic                       rc_rx_error,
  input  logic                       rc_rx_ready,
  // indicators
  output logic                       led_up,
  output logic                       led_test,
  output logic                       led_xoff
);
  // ---------------- UCLK: input FIFO write side ----------------
  logic        fifo_full, fifo_afull, fifo_empty, fifo_rd;
  slink_word_t fifo_rdata;

  async_fifo #(.WIDTH(33), .DEPTH(FIFO_DEPTH), .AF_MARGIN(2)) u_fifo (
    .wclk(uclk), .wrst_n(por_n), .wr(!uwen_n && !fifo_full), .wdata({!uctrl_n, ud}),
    .full(fifo_full), .almost_full(fifo_afull),
    .rclk(xclk), .rrst_n(por_n), .rd(fifo_rd), .rdata(fifo_rdata), .empty(fifo_empty)
  );
  assign lff_n = !fifo_afull;

  // ---------------- return channel receiver ----------------
  logic       rc_xoff, rc_rlup, rc_ldc_reset, rc_ok, rc_bad;
  logic [3:0] rc_lrl;
  rc_decoder u_rc (
    .clk(rc_rxclk), .rst_n(por_n), .rx(rc_rx), .rx_error(rc_rx_error),
    .lrl(rc_lrl), .xoff(rc_xoff), .rlup(rc_rlup), .ldc_reset(rc_ldc_reset),
    .word_ok(rc_ok), .word_bad(rc_bad)
  );

  // ---------------- XCLK: protocol logic ----------------
  logic       xoff, rlup, ldc_reset, lsc_reset, test_req;
  logic [3:0] lrl_s;
  sync_2ff #(.WIDTH(9)) u_sync (
    .clk(xclk), .rst_n(por_n),
    .d({rc_lrl, rc_xoff, rc_rlup, rc_ldc_reset, !ureset_n, !utdo_n}),
    .q({lrl_s, xoff, rlup, ldc_reset, lsc_reset, test_req})
  );

  logic hp_up;
  hp_up_filter #(.NRX(1), .CNT_BITS(HP_CNT_BITS)) u_hp (
    .clk(xclk), .rst_n(por_n), .tx_locked(&fwd_tx_locked), .rx_ready(rc_rx_ready), .hp_up(hp_up)
  );

  lsc_state_e state;
  logic       link_up, fsm_ldown, fsm_cmd_valid;
  odin_cmd_e  fsm_cmd;
  lsc_fsm #(.RESET_CYCLES(RESET_CYCLES)) u_fsm (
    .clk(xclk), .rst_n(por_n), .hp_up(hp_up), .rlup(rlup), .ldc_reset(ldc_reset),
    .lsc_reset(lsc_reset), .state(state), .link_up(link_up), .ldown(fsm_ldown),
    .cmd_valid(fsm_cmd_valid), .cmd(fsm_cmd)
  );

  logic    [CHANNELS-1:0]       req_valid, req_ready, data_sent;
  tx_req_e [CHANNELS-1:0]       req_kind;
  logic    [CHANNELS-1:0][31:0] req_data;
  logic                         test_active, crc_sent;

  lsc_router #(.CHANNELS(CHANNELS), .CRC_WORDS(CRC_WORDS)) u_router (
    .clk(xclk), .rst_n(por_n), .link_up(link_up), .cmd_valid(fsm_cmd_valid), .cmd(fsm_cmd),
    .xoff(xoff), .test_req(test_req), .fifo_rdata(fifo_rdata), .fifo_empty(fifo_empty),
    .fifo_rd(fifo_rd), .req_valid(req_valid), .req_kind(req_kind), .req_data(req_data),
    .req_ready(req_ready), .test_active(test_active), .crc_sent(crc_sent)
  );

  for (genvar c = 0; c < CHANNELS; c++) begin : g_ch
    glink_tx_encoder u_enc (
      .clk(xclk), .rst_n(por_n), .req_valid(req_valid[c]), .req_kind(req_kind[c]),
      .req_data(req_data[c]), .req_ready(req_ready[c]), .tx(fwd_tx[c]), .data_sent(data_sent[c])
    );
  end

  // LRL follows the return lines only while the link is up and holds its
  // value while it is down.
  always_ff @(posedge xclk or negedge por_n) begin
    if (!por_n)       lrl <= '0;
    else if (link_up) lrl <= lrl_s;
  end

  assign ldown_n  = !(fsm_ldown || test_active);
  assign led_up   = link_up;
  assign led_test = test_active;
  assign led_xoff = !lff_n;
endmodule
