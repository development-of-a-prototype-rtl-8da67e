// tb_odin_link: end-to-end test of the complete ODIN link in both of its
// configurations, double (two forward channels) and single (one channel),
// with short filter and CRC intervals so that every mechanism is reached in
// little simulated time.  The work is done by odin_env; this module pairs
// each odin_link with an environment, waits for both and prints the result.
module tb_odin_link;
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

    odin_link #(.CHANNELS(CH), .HP_CNT_BITS(6), .CRC_WORDS(16)) u_dut (.*);
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
