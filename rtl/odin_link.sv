// odin_link: the ODIN optical S-LINK, both protocol chips side by side.
//
// ODIN is a duplex S-LINK: a Link Source Card (odin_lsc) on the front-end
// motherboard sends 32-bit words plus a control flag to a Link Destination
// Card (odin_ldc) on the read-out motherboard, over CHANNELS 16-bit G-Link
// serializer channels and optical fibres; one more G-Link channel carries
// flow control, four return lines and link state back.  The G-Link chips,
// optical transceivers and fibres lie between the two chips and are not
// logic of this design, so their parallel interfaces are ports here:
//   lsc_fwd_tx[c]  -> (G-Link tx, fibre, G-Link rx) -> ldc_fwd_rx[c]
//   ldc_rc_tx      -> (G-Link tx, fibre, G-Link rx) -> lsc_rc_rx
// with the receivers' recovered clocks entering as ldc_rx_clk and
// lsc_rc_rxclk.  Each card has its own power-on reset and oscillator (xclk).
// CHANNELS = 2 is the double ODIN (40 MHz G-Link clock, 160 Mbyte/s);
// CHANNELS = 1 the single ODIN (64 MHz, 128 Mbyte/s, LCLK at 32 MHz).
// The two cards must be built with the same CHANNELS.
module odin_link
  import odin_pkg::*;
#(
  parameter int CHANNELS    = 2,
  parameter int HP_CNT_BITS = 21,
  parameter int CRC_WORDS   = 1024
) (
  // ---- Link Source Card ----
  input  logic                       lsc_por_n,
  input  logic                       lsc_xclk,
  input  logic                       uclk,
  input  logic                       lsc_ureset_n,
  input  logic                       uwen_n,
  input  logic                       uctrl_n,
  input  logic [31:0]                ud,
  input  logic                       utdo_n,
  output logic                       lff_n,
  output logic                       lsc_ldown_n,
  output logic [3:0]                 lrl,
  output glink_word_t [CHANNELS-1:0] lsc_fwd_tx,
  input  logic        [CHANNELS-1:0] lsc_fwd_tx_locked,
  input  logic                       lsc_rc_rxclk,
  input  glink_word_t                lsc_rc_rx,
  input  logic                       lsc_rc_rx_error,
  input  logic                       lsc_rc_rx_ready,
  output logic                       lsc_led_up,
  output logic                       lsc_led_test,
  output logic                       lsc_led_xoff,
  // ---- Link Destination Card ----
  input  logic                       ldc_por_n,
  input  logic                       ldc_xclk,
  input  logic                       ldc_rx_clk,
  input  glink_word_t [CHANNELS-1:0] ldc_fwd_rx,
  input  logic        [CHANNELS-1:0] ldc_fwd_rx_error,
  input  logic        [CHANNELS-1:0] ldc_fwd_rx_ready,
  output glink_word_t                ldc_rc_tx,
  input  logic                       ldc_rc_tx_locked,
  input  logic                       ldc_ureset_n,
  input  logic                       uxoff_n,
  input  logic [3:0]                 url,
  output logic                       lclk,
  output logic [31:0]                ld,
  output logic                       lctrl_n,
  output logic                       lwen_n,
  output logic                       lderr_n,
  output logic                       ldc_ldown_n,
  output logic                       ldc_led_up,
  output logic                       ldc_led_test,
  output logic                       ldc_led_err,
  output logic                       ldc_led_xoff
);
  odin_lsc #(.CHANNELS(CHANNELS), .HP_CNT_BITS(HP_CNT_BITS), .CRC_WORDS(CRC_WORDS)) u_lsc (
    .por_n(lsc_por_n), .uclk(uclk), .ureset_n(lsc_ureset_n), .uwen_n(uwen_n), .uctrl_n(uctrl_n),
    .ud(ud), .utdo_n(utdo_n), .lff_n(lff_n), .ldown_n(lsc_ldown_n), .lrl(lrl),
    .xclk(lsc_xclk), .fwd_tx(lsc_fwd_tx), .fwd_tx_locked(lsc_fwd_tx_locked),
    .rc_rxclk(lsc_rc_rxclk), .rc_rx(lsc_rc_rx), .rc_rx_error(lsc_rc_rx_error),
    .rc_rx_ready(lsc_rc_rx_ready),
    .led_up(lsc_led_up), .led_test(lsc_led_test), .led_xoff(lsc_led_xoff)
  );

  odin_ldc #(.CHANNELS(CHANNELS), .HP_CNT_BITS(HP_CNT_BITS)) u_ldc (
    .por_n(ldc_por_n), .rx_clk(ldc_rx_clk), .fwd_rx(ldc_fwd_rx), .fwd_rx_error(ldc_fwd_rx_error),
    .fwd_rx_ready(ldc_fwd_rx_ready), .xclk(ldc_xclk), .rc_tx(ldc_rc_tx),
    .rc_tx_locked(ldc_rc_tx_locked), .ureset_n(ldc_ureset_n), .uxoff_n(uxoff_n), .url(url),
    .lclk(lclk), .ld(ld), .lctrl_n(lctrl_n), .lwen_n(lwen_n), .lderr_n(lderr_n),
    .ldown_n(ldc_ldown_n), .led_up(ldc_led_up), .led_test(ldc_led_test),
    .led_err(ldc_led_err), .led_xoff(ldc_led_xoff)
  );
endmodule
