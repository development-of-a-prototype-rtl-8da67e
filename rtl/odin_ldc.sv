// odin_ldc: protocol chip of the ODIN Link Destination Card (LDC).
//
// The LDC receives the forward G-Link channels, rebuilds the 33-bit S-LINK
// words in their original order and hands them to the read-out motherboard
// (ROMB); it sends flow control (UXOFF#), the four return lines URL[3:0] and
// its link state back to the LSC on one return G-Link channel.
//
// Data path:  G-Link receivers --(rx_clk)--> glink_rx_decoder x CHANNELS
//             --> ldc_merge --> LD/LCTRL#/LWEN#/LDERR#
//             (single version: --> ldc_sgmux, which makes LCLK = rx_clk / 2)
// Control:    ldc_merge commands --> synchronisers --> ldc_fsm (xclk)
//             ldc_fsm, UXOFF#, URL --> rc_encoder --> return G-Link transmitter
//
// Clock domains: rx_clk, the clock recovered by the channel A receiver (the B
// receiver runs locked to it, so both channels arrive in this domain);
// xclk, the on-board oscillator that runs the state machine and the return
// channel.  In the double version LCLK is rx_clk itself (40 MHz); in the
// single version it is rx_clk divided by two (32 MHz from 64 MHz).  The RRES
// event crosses into xclk through a toggle synchroniser; rlup, UXOFF#,
// URL and URESET# are levels and use two-flop synchronisers.
//
// S-LINK outputs are active low as in the S-LINK standard.  LDOWN# is low
// while the state machine is not up and during self-test.  led_err shows a
// test-pattern error.  The structure follows ODIN; the
// synchroniser choices are this implementation's own.
module odin_ldc
  import odin_pkg::*;
#(
  parameter int CHANNELS    = 2,
  parameter int HP_CNT_BITS = 21
) (
  input  logic                       por_n,
  // forward G-Link receivers
  input  logic                       rx_clk,
  input  glink_word_t [CHANNELS-1:0] fwd_rx,
  input  logic        [CHANNELS-1:0] fwd_rx_error,
  input  logic        [CHANNELS-1:0] fwd_rx_ready,
  // return G-Link transmitter
  input  logic                       xclk,
  output glink_word_t                rc_tx,
  input  logic                       rc_tx_locked,
  // S-LINK user side (ROMB)
  input  logic                       ureset_n,
  input  logic                       uxoff_n,
  input  logic [3:0]                 url,
  output logic                       lclk,
  output logic [31:0]                ld,
  output logic                       lctrl_n,
  output logic                       lwen_n,
  output logic                       lderr_n,
  output logic                       ldown_n,
  // indicators
  output logic                       led_up,
  output logic                       led_test,
  output logic                       led_err,
  output logic                       led_xoff
);
  // ---------------- rx_clk: forward channel decoding ----------------
  logic        [CHANNELS-1:0] dec_valid, dec_par_err, dec_cmd_valid, dec_crc_chk, dec_crc_err;
  slink_word_t [CHANNELS-1:0] dec_word;
  odin_cmd_e   [CHANNELS-1:0] dec_cmd;

  for (genvar c = 0; c < CHANNELS; c++) begin : g_ch
    glink_rx_decoder u_dec (
      .clk(rx_clk), .rst_n(por_n), .rx(fwd_rx[c]), .rx_error(fwd_rx_error[c]),
      .out_valid(dec_valid[c]), .out_word(dec_word[c]), .out_par_err(dec_par_err[c]),
      .cmd_valid(dec_cmd_valid[c]), .cmd(dec_cmd[c]),
      .crc_checked(dec_crc_chk[c]), .crc_err(dec_crc_err[c])
    );
  end

  logic        m_valid, m_lderr, test_mode, test_err, rx_rlup, rx_lsc_reset, m_overflow;
  slink_word_t m_word;

  ldc_merge #(.CHANNELS(CHANNELS)) u_merge (
    .clk(rx_clk), .rst_n(por_n), .in_valid(dec_valid), .in_word(dec_word),
    .in_par_err(dec_par_err), .in_crc_err(dec_crc_err),
    .cmd_valid(dec_cmd_valid[0]), .cmd(dec_cmd[0]),
    .out_valid(m_valid), .out_word(m_word), .lderr(m_lderr),
    .test_mode(test_mode), .test_err(test_err), .rlup(rx_rlup),
    .lsc_reset(rx_lsc_reset), .overflow(m_overflow)
  );

  if (CHANNELS == 1) begin : g_single
    logic        s_lwen, s_lderr, s_overflow;
    slink_word_t s_ld;
    ldc_sgmux u_sgmux (
      .clk(rx_clk), .rst_n(por_n), .in_valid(m_valid), .in_word(m_word), .in_err(m_lderr),
      .lclk(lclk), .lwen(s_lwen), .ld(s_ld), .lderr(s_lderr), .overflow(s_overflow)
    );
    assign ld      = s_ld.d;
    assign lctrl_n = !s_ld.ctrl;
    assign lwen_n  = !s_lwen;
    assign lderr_n = !s_lderr;
  end else begin : g_double
    assign lclk    = rx_clk;
    assign ld      = m_word.d;
    assign lctrl_n = !m_word.ctrl;
    assign lwen_n  = !m_valid;
    assign lderr_n = !m_lderr;
  end

  // ---------------- xclk: state machine and return channel ----------------
  logic rlup, ldc_reset, xoff;
  logic [3:0] url_s;
  sync_2ff #(.WIDTH(7)) u_sync (
    .clk(xclk), .rst_n(por_n), .d({rx_rlup, !ureset_n, !uxoff_n, url}),
    .q({rlup, ldc_reset, xoff, url_s})
  );

  logic lsc_reset;
  sync_pulse u_rres_sync (
    .src_clk(rx_clk), .src_rst_n(por_n), .src_pulse(rx_lsc_reset),
    .dst_clk(xclk), .dst_rst_n(por_n), .dst_pulse(lsc_reset)
  );

  logic hp_up;
  hp_up_filter #(.NRX(CHANNELS), .CNT_BITS(HP_CNT_BITS)) u_hp (
    .clk(xclk), .rst_n(por_n), .tx_locked(rc_tx_locked), .rx_ready(fwd_rx_ready), .hp_up(hp_up)
  );

  ldc_state_e state;
  logic       ret_down, ret_reset, fsm_ldown;
  ldc_fsm u_fsm (
    .clk(xclk), .rst_n(por_n), .hp_up(hp_up), .rlup(rlup), .lsc_reset(lsc_reset),
    .ldc_reset(ldc_reset), .state(state), .ret_down(ret_down), .ret_reset(ret_reset),
    .ldown(fsm_ldown)
  );

  rc_encoder u_rc (
    .clk(xclk), .rst_n(por_n), .url(url_s), .xoff(xoff),
    .ldc_down(ret_down), .ldc_reset(ret_reset), .tx(rc_tx)
  );

  assign ldown_n  = !(fsm_ldown || test_mode);
  assign led_up   = (state == LDC_UP);
  assign led_test = test_mode;
  assign led_err  = test_err;
  assign led_xoff = xoff;
endmodule
