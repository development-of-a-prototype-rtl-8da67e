// tb_odin_lsc: test of the Link Source Card protocol chip (odin_lsc).
// The LSC is checked from its user side and through its partner: it is
// wired to an odin_ldc over modelled G-Link chips and fibres, in the double
// and the single configuration, and odin_env runs the link scenario against
// the pair: data and control words, CRC words, XOFF stalls, return lines,
// self-test, resets from either side and a broken fibre.  What the LSC does
// wrong shows up as a word the LDC user receives wrongly, or as a link state
// the scenario does not expect.
module tb_odin_lsc;
  import odin_pkg::*;

  int   ck [2], fl [2];
  logic dn [2];

  for (genvar g = 0; g < 2; g++) begin : g_cfg
    localparam int CH = 2 - g;
    logic lsc_por_n, lsc_xclk, uclk, lsc_ureset_n, uwen_n, uctrl_n, utdo_n, lff_n, lsc_ldown_n;
    logic [31:0] ud, ld;
    logic [3:0]  lrl, url;
    glink_word_t [CH-1:0] lsc_fwd_tx, ldc_fwd_rx;
    logic        [CH-1:0] lsc_fwd_tx_locked, ldc_fwd_rx_error, ldc_fwd_rx_ready;
    logic lsc_rc_rxclk, lsc_rc_rx_error, lsc_rc_rx_ready;
    glink_word_t lsc_rc_rx, ldc_rc_tx;
    logic lsc_led_up, lsc_led_test, lsc_led_xoff;
    logic ldc_por_n, ldc_xclk, ldc_rx_clk, ldc_rc_tx_locked, ldc_ureset_n, uxoff_n;
    logic lclk, lctrl_n, lwen_n, lderr_n, ldc_ldown_n;
    logic ldc_led_up, ldc_led_test, ldc_led_err, ldc_led_xoff;
    int   checks, failures;
    logic done;

    odin_lsc #(.CHANNELS(CH), .HP_CNT_BITS(6), .CRC_WORDS(16)) u_lsc (
      .por_n(lsc_por_n), .uclk(uclk), .ureset_n(lsc_ureset_n), .uwen_n(uwen_n),
      .uctrl_n(uctrl_n), .ud(ud), .utdo_n(utdo_n), .lff_n(lff_n), .ldown_n(lsc_ldown_n),
      .lrl(lrl), .xclk(lsc_xclk), .fwd_tx(lsc_fwd_tx), .fwd_tx_locked(lsc_fwd_tx_locked),
      .rc_rxclk(lsc_rc_rxclk), .rc_rx(lsc_rc_rx), .rc_rx_error(lsc_rc_rx_error),
      .rc_rx_ready(lsc_rc_rx_ready), .led_up(lsc_led_up), .led_test(lsc_led_test),
      .led_xoff(lsc_led_xoff)
    );
    odin_ldc #(.CHANNELS(CH), .HP_CNT_BITS(6)) u_ldc (
      .por_n(ldc_por_n), .rx_clk(ldc_rx_clk), .fwd_rx(ldc_fwd_rx),
      .fwd_rx_error(ldc_fwd_rx_error), .fwd_rx_ready(ldc_fwd_rx_ready), .xclk(ldc_xclk),
      .rc_tx(ldc_rc_tx), .rc_tx_locked(ldc_rc_tx_locked), .ureset_n(ldc_ureset_n),
      .uxoff_n(uxoff_n), .url(url), .lclk(lclk), .ld(ld), .lctrl_n(lctrl_n), .lwen_n(lwen_n),
      .lderr_n(lderr_n), .ldown_n(ldc_ldown_n), .led_up(ldc_led_up),
      .led_test(ldc_led_test), .led_err(ldc_led_err), .led_xoff(ldc_led_xoff)
    );
    odin_env #(.CHANNELS(CH), .HP_CNT_BITS(6), .CRC_WORDS(16),
               .NAME(CH == 2 ? "double" : "single")) u_env (.*);

    assign ck[g] = checks;
    assign fl[g] = failures;
    assign dn[g] = done;
  end

  initial begin
    #100;
    wait (dn[0] === 1'b1 && dn[1] === 1'b1);
    #1000;
    $display("TB_RESULT checks=%0d failures=%0d", ck[0] + ck[1], fl[0] + fl[1]);
    $finish;
  end

  initial begin
    #(64'd2_000_000_000);
    $display("watchdog: timeout, double done=%b single done=%b", dn[0], dn[1]);
    $display("TB_RESULT checks=%0d failures=%0d", ck[0] + ck[1], fl[0] + fl[1] + 1);
    $finish;
  end
endmodule
