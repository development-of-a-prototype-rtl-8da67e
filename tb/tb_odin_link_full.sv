// tb_odin_link_full: the complete ODIN link at its default parameters
// (double ODIN, 21-bit power-up filter, CRC word every 1024 words per
// channel), run through the same scenario as tb_odin_link.  Every link-up
// waits for the full 2^21-cycle filter of both cards, so this is the slow
// test; the long block holds more than two CRC intervals.
module tb_odin_link_full;
  import odin_pkg::*;

  logic lsc_por_n, lsc_xclk, uclk, lsc_ureset_n, uwen_n, uctrl_n, utdo_n, lff_n, lsc_ldown_n;
  logic [31:0] ud, ld;
  logic [3:0]  lrl, url;
  glink_word_t [1:0] lsc_fwd_tx, ldc_fwd_rx;
  logic        [1:0] lsc_fwd_tx_locked, ldc_fwd_rx_error, ldc_fwd_rx_ready;
  logic lsc_rc_rxclk, lsc_rc_rx_error, lsc_rc_rx_ready;
  glink_word_t lsc_rc_rx, ldc_rc_tx;
  logic lsc_led_up, lsc_led_test, lsc_led_xoff;
  logic ldc_por_n, ldc_xclk, ldc_rx_clk, ldc_rc_tx_locked, ldc_ureset_n, uxoff_n;
  logic lclk, lctrl_n, lwen_n, lderr_n, ldc_ldown_n;
  logic ldc_led_up, ldc_led_test, ldc_led_err, ldc_led_xoff;
  int   checks, failures;
  logic done;

  odin_link u_dut (.*);
  odin_env #(.CHANNELS(2), .HP_CNT_BITS(21), .CRC_WORDS(1024), .NAME("full")) u_env (.*);

  initial begin
    #100;
    wait (done === 1'b1);
    #1000;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #(64'd900_000_000_000);
    $display("watchdog: timeout");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end
endmodule
