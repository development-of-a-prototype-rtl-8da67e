// odin_env: stimulus, scoreboard and mechanism counters for the complete
// ODIN link (odin_link), shared by the end-to-end testbenches.
//
// The environment plays every part around the two protocol chips: the
// front-end motherboard writing S-LINK blocks into the LSC, the read-out
// motherboard taking them from the LDC, the four G-Link chip pairs with their
// fibres (glink_model), and the oscillators and power-on resets of both
// cards.  The LDC's forward receive clock is the LSC oscillator (as recovered
// by a G-Link receiver), the LSC's return receive clock is the LDC oscillator.
// Half periods are in units of 0.1 ns: CHANNELS = 2 runs the LSC oscillator
// at 40 MHz, CHANNELS = 1 at 64 MHz; the LDC oscillator runs 0.5-1 % slower than the
// LSC one, the user clock about 1 % faster than 40 MHz.
//
// The scenario: power-up, blocks of random size, a block long enough for
// periodic CRC words with a throughput measurement, XOFF back-pressure,
// return lines, a bit error on the fibre, self-test, LDC reset, LSC reset,
// a broken fibre (link must stay down until a reset), and data again after
// each of these.  During self-test the LDC passes the walking-one pattern
// to its user (the last ones a few LDC clocks after its test LED goes
// off, from the output pipeline); those words are checked for the pattern only.  Every word the LDC writes is compared with what the LSC
// user wrote (data exactly, control words on bits 31:4, bits 3:0 being the
// error report).  Each mechanism is counted; one that never happened is a
// failure.  Results go to the instantiating testbench through checks,
// failures and done.
module odin_env
  import odin_pkg::*;
#(
  parameter int    CHANNELS    = 2,
  parameter int    HP_CNT_BITS = 21,
  parameter int    CRC_WORDS   = 1024,
  parameter string NAME        = "odin"
) (
  output logic                       lsc_por_n,
  output logic                       lsc_xclk,
  output logic                       uclk,
  output logic                       lsc_ureset_n,
  output logic                       uwen_n,
  output logic                       uctrl_n,
  output logic [31:0]                ud,
  output logic                       utdo_n,
  input  logic                       lff_n,
  input  logic                       lsc_ldown_n,
  input  logic [3:0]                 lrl,
  input  glink_word_t [CHANNELS-1:0] lsc_fwd_tx,
  output logic        [CHANNELS-1:0] lsc_fwd_tx_locked,
  output logic                       lsc_rc_rxclk,
  output glink_word_t                lsc_rc_rx,
  output logic                       lsc_rc_rx_error,
  output logic                       lsc_rc_rx_ready,
  input  logic                       lsc_led_up,
  input  logic                       lsc_led_test,
  input  logic                       lsc_led_xoff,
  output logic                       ldc_por_n,
  output logic                       ldc_xclk,
  output logic                       ldc_rx_clk,
  output glink_word_t [CHANNELS-1:0] ldc_fwd_rx,
  output logic        [CHANNELS-1:0] ldc_fwd_rx_error,
  output logic        [CHANNELS-1:0] ldc_fwd_rx_ready,
  input  glink_word_t                ldc_rc_tx,
  output logic                       ldc_rc_tx_locked,
  output logic                       ldc_ureset_n,
  output logic                       uxoff_n,
  output logic [3:0]                 url,
  input  logic                       lclk,
  input  logic [31:0]                ld,
  input  logic                       lctrl_n,
  input  logic                       lwen_n,
  input  logic                       lderr_n,
  input  logic                       ldc_ldown_n,
  input  logic                       ldc_led_up,
  input  logic                       ldc_led_test,
  input  logic                       ldc_led_err,
  input  logic                       ldc_led_xoff,
  output int                         checks,
  output int                         failures,
  output logic                       done
);
  localparam int LSC_HALF = (CHANNELS == 2) ? 125 : 78;   // 40.0 / 64.1 MHz
  localparam int LDC_HALF = (CHANNELS == 2) ? 126 : 79;
  localparam int U_HALF   = 124;                          // 40.3 MHz
  localparam int HP_WAIT  = (1 << HP_CNT_BITS) + 4000;    // longest filter time, in LSC cycles
  localparam int BIG      = 2 * CRC_WORDS * CHANNELS + 37;

  // ---------------- clocks ----------------
  initial begin lsc_xclk = 0; forever #(LSC_HALF) lsc_xclk = ~lsc_xclk; end
  initial begin ldc_xclk = 0; #(37); forever #(LDC_HALF) ldc_xclk = ~ldc_xclk; end
  initial begin uclk = 0; #(11); forever #(U_HALF) uclk = ~uclk; end
  assign ldc_rx_clk   = lsc_xclk;
  assign lsc_rc_rxclk = ldc_xclk;

  // ---------------- G-Link chip pairs and fibres ----------------
  logic fwd_conn, rc_conn, flip;
  for (genvar c = 0; c < CHANNELS; c++) begin : g_fwd
    glink_model u_fwd (
      .clk(lsc_xclk), .power_n(lsc_por_n), .connected(fwd_conn), .tx(lsc_fwd_tx[c]),
      .flip(flip && c == 0), .rx(ldc_fwd_rx[c]), .rx_ready(ldc_fwd_rx_ready[c]),
      .rx_error(ldc_fwd_rx_error[c]), .tx_locked(lsc_fwd_tx_locked[c])
    );
  end
  glink_model u_rc (
    .clk(ldc_xclk), .power_n(ldc_por_n), .connected(rc_conn), .tx(ldc_rc_tx), .flip(1'b0),
    .rx(lsc_rc_rx), .rx_ready(lsc_rc_rx_ready), .rx_error(lsc_rc_rx_error),
    .tx_locked(ldc_rc_tx_locked)
  );

  // ---------------- bookkeeping ----------------
  int n_data, n_ctrl, n_crc_ctrl, n_crc_period, n_xoff_stall, n_lrl, n_crc_err, n_test,
      n_ldc_reset, n_lsc_reset, n_down_latched, n_lrl_hold, n_power_up, n_ton, n_toff, n_rres, n_rldwn;

  task automatic check(input bit cond, input string what);
    checks++;
    if (!cond) begin
      failures++;
      if (failures <= 20) $display("[%s] FAIL @%0t: %s", NAME, $time, what);
    end
  endtask

  task automatic lsc_cycles(input int n);
    repeat (n) @(posedge lsc_xclk);
  endtask

  // ---------------- LSC user side (front-end motherboard) ----------------
  slink_word_t src_q[$], exp_q[$];
  logic        wr_en;

  task automatic push_block(input int n, input int id);
    src_q.push_back('{ctrl: 1'b1, d: {8'hB0, 8'(id), 12'h000, 4'h0}});
    for (int i = 0; i < n; i++) src_q.push_back('{ctrl: 1'b0, d: {8'(id), 24'($urandom)}});
    src_q.push_back('{ctrl: 1'b1, d: {8'hE0, 8'(id), 12'(n), 4'h0}});
  endtask

  always @(negedge uclk) begin
    uwen_n = 1'b1;
    if (wr_en && lff_n && lsc_ldown_n && src_q.size() > 0) begin
      slink_word_t w;
      w       = src_q.pop_front();
      uwen_n  = 1'b0;
      uctrl_n = !w.ctrl;
      ud      = w.d;
      exp_q.push_back(w);
    end
  end

  // ---------------- LDC user side (read-out motherboard) ----------------
  logic flip_armed, flip_hit;
  int   n_test_words, test_tail;
  int   rx_words;

  always @(posedge lclk) begin
    if (ldc_led_test) test_tail = 8;
    else if (test_tail > 0) test_tail--;
    if (!ldc_por_n) begin
      // outputs are not defined before the first clock edge under reset
    end else if (!lwen_n && test_tail > 0) begin
      // self-test words are passed to the user too: walking one in data words
      n_test_words++;
      if (lctrl_n) check($onehot(ld), $sformatf("test pattern word %h", ld));
    end else if (!lwen_n) begin
      rx_words++;
      if (exp_q.size() == 0) check(1'b0, $sformatf("unexpected LDC word %h", ld));
      else begin
        slink_word_t e;
        e = exp_q.pop_front();
        check(!lctrl_n == e.ctrl, $sformatf("control flag of word %h", e.d));
        if (e.ctrl) begin
          n_ctrl++;
          check(ld[31:4] == e.d[31:4], $sformatf("control word %h, expected %h", ld, e.d));
          if (flip_armed) begin
            check(!lderr_n && (ld[3] || ld[2]), "bit error on fibre not reported by CRC");
            if (!lderr_n && (ld[3] || ld[2])) n_crc_err++;
            flip_armed = 1'b0;
          end else
            check(lderr_n && ld[3:0] == 4'h0, $sformatf("spurious error report %h", ld[3:0]));
        end else begin
          n_data++;
          if (flip_armed && !flip_hit && ld != e.d && $onehot(ld ^ e.d) && (ld ^ e.d) & 32'h0001_0001) begin
            // the corrupted word itself: it goes through, the CRC flags it later
            flip_hit = 1'b1;
          end else
            check(ld == e.d, $sformatf("data word %h, expected %h", ld, e.d));
          check(lderr_n, "LDERR on a data word");
        end
      end
    end
  end

  // ---------------- forward channel monitor (CRC words, commands) ----------------
  int mon;
  always @(posedge lsc_xclk) begin
    glink_word_t w;
    w = lsc_fwd_tx[0];
    if (w.cav) begin
      case (w.d[9:0])
        CMD_CRCC:  mon = 1;
        CMD_TON:   n_ton++;
        CMD_TOFF:  n_toff++;
        CMD_RRES:  n_rres++;
        CMD_RLDWN: n_rldwn++;
        default: check(1'b0, $sformatf("unknown command %b", w.d[9:0]));
      endcase
    end else if (w.dav) begin
      if (mon == 1) mon = 2;
      else if (mon == 2) begin
        if (!lsc_led_test) begin
          if (w.flag) n_crc_period++;
          else        n_crc_ctrl++;
        end
        mon = 0;
      end
    end
  end

  // ---------------- helpers ----------------
  task automatic wait_link_up(input string what);
    int t;
    for (t = 0; t < 3 * HP_WAIT && !(lsc_ldown_n && ldc_ldown_n); t++) lsc_cycles(1);
    check(lsc_ldown_n && ldc_ldown_n, {"link up after ", what});
    check(lsc_led_up && ldc_led_up, {"up LEDs after ", what});
  endtask

  task automatic wait_drained(input string what);
    int t;
    for (t = 0; t < 200000 && (src_q.size() > 0 || exp_q.size() > 0); t++) lsc_cycles(1);
    check(src_q.size() == 0 && exp_q.size() == 0, {"all words delivered: ", what});
    lsc_cycles(20);
  endtask

  task automatic blocks(input int n, input int id0, input string what);
    for (int b = 0; b < n; b++) push_block($urandom_range(0, 40), id0 + b);
    wait_drained(what);
  endtask

  // ---------------- scenario ----------------
  initial begin
    int t, seen;
    int     r0;
    real    mbs, nominal;
    checks = 0; failures = 0; done = 1'b0;
    lsc_por_n = 0; ldc_por_n = 0; lsc_ureset_n = 1; ldc_ureset_n = 1;
    uwen_n = 1; uctrl_n = 1; ud = '0; utdo_n = 1; uxoff_n = 1; url = 4'h0;
    fwd_conn = 1; rc_conn = 1; flip = 0; wr_en = 1; flip_armed = 0; flip_hit = 0; test_tail = 0; mon = 0;
    lsc_cycles(20);
    ldc_por_n = 1;
    lsc_cycles(7);
    lsc_por_n = 1;

    // 1. power-up: the destination comes up first, the source follows
    for (t = 0; t < 3 * HP_WAIT && !ldc_ldown_n; t++) lsc_cycles(1);
    check(ldc_ldown_n && !lsc_ldown_n, "LDC up before LSC after power-up");
    wait_link_up("power-up");
    if (lsc_ldown_n && ldc_ldown_n) n_power_up++;
    check(n_rres > 0, "remote reset sent during power-up");

    // 2. blocks of random size
    blocks(8, 1, "random blocks");

    // 3. one long block: periodic CRC words and throughput
    push_block(BIG, 20);
    for (t = 0; t < 200000 && rx_words == 0; t++) lsc_cycles(1);
    for (t = 0; t < 200000 && exp_q.size() + src_q.size() > BIG - 10; t++) lsc_cycles(1);
    r0 = rx_words;
    for (t = 0; t < 200000 && exp_q.size() + src_q.size() > 20; t++) lsc_cycles(1);
    // words per LSC oscillator cycle, scaled to the nominal 40 / 64 MHz
    mbs     = 4.0 * (rx_words - r0) / real'(t) * ((CHANNELS == 2) ? 40.0 : 64.0);
    nominal = (CHANNELS == 2) ? 160.0 : 128.0;
    $display("[%s] throughput %0.1f Mbyte/s over %0d words (nominal %0.0f)", NAME, mbs,
             rx_words - r0, nominal);
    check(mbs > 0.88 * nominal * CRC_WORDS / (CRC_WORDS + 1), "throughput");
    check(mbs < 1.02 * nominal, "throughput not above the link rate");
    wait_drained("long block");
    check(n_crc_period > 0, "periodic CRC inside long block");
    check(n_crc_ctrl > 0, "CRC before control words");

    // 4. XOFF: the destination stops the source
    r0 = rx_words;
    push_block(300, 30);
    for (t = 0; t < 200000 && rx_words < r0 + 50; t++) lsc_cycles(1);
    r0 = rx_words;
    @(negedge ldc_xclk) uxoff_n = 0;
    seen = 0;
    for (t = 0; t < 400; t++) begin
      lsc_cycles(1);
      if (!lff_n && lsc_led_xoff) seen = 1;
    end
    check(ldc_led_xoff, "XOFF LED at LDC");
    check(seen == 1, "LSC FIFO fills under XOFF (LFF# low)");
    // read-out buffer the destination needs behind XOFF at zero fibre length:
    // 40 words for the double ODIN, 20 for the single one
    $display("[%s] words received after XOFF: %0d", NAME, rx_words - r0);
    check(rx_words - r0 <= ((CHANNELS == 2) ? 40 : 20), $sformatf("words after XOFF %0d", rx_words - r0));
    if (seen && rx_words - r0 <= ((CHANNELS == 2) ? 40 : 20)) n_xoff_stall++;
    r0 = rx_words;
    lsc_cycles(200);
    check(rx_words == r0, "no words while XOFF is held");
    @(negedge ldc_xclk) uxoff_n = 1;
    wait_drained("after XOFF");

    // 5. return lines
    for (int k = 0; k < 4; k++) begin
      @(negedge ldc_xclk) url = 4'($urandom);
      lsc_cycles(60);
      check(lrl == url, $sformatf("return lines %h at LSC, %h at LDC", lrl, url));
      if (lrl == url) n_lrl++;
    end

    // 6. bit error on the fibre, reported with the next control word
    push_block(200, 40);
    for (t = 0; t < 200000 && exp_q.size() + src_q.size() > 150; t++) lsc_cycles(1);
    flip_armed = 1;
    @(negedge lsc_xclk) flip = 1;
    @(negedge lsc_xclk) flip = 0;
    wait_drained("bit error block");
    check(!flip_armed, "error report consumed");
    blocks(3, 41, "after bit error");

    // 7. self-test
    @(negedge uclk) utdo_n = 0;
    for (t = 0; t < 2000 && !ldc_led_test; t++) lsc_cycles(1);
    check(ldc_led_test && lsc_led_test, "test mode entered at both ends");
    check(!lsc_ldown_n && !ldc_ldown_n, "LDOWN# during test mode");
    lsc_cycles(300);
    check(!ldc_led_err, "test pattern received without error");
    check(n_test_words > 32, $sformatf("test words at LDC output: %0d", n_test_words));
    if (ldc_led_test && !ldc_led_err) n_test++;
    @(negedge uclk) utdo_n = 1;
    for (t = 0; t < 2000 && (ldc_led_test || lsc_led_test); t++) lsc_cycles(1);
    check(n_ton > 0 && n_toff > 0, "TON and TOFF commands sent");
    wait_link_up("test mode");
    blocks(3, 50, "after test mode");

    // 8. LDC reset
    @(negedge ldc_xclk) ldc_ureset_n = 0;
    seen = 0;
    for (t = 0; t < 400; t++) begin
      lsc_cycles(1);
      if (!ldc_ldown_n) seen = 1;
      if (t == 20) ldc_ureset_n = 1;
    end
    check(seen == 1, "LDC link down during LDC reset");
    wait_link_up("LDC reset");
    if (seen) n_ldc_reset++;
    blocks(3, 60, "after LDC reset");

    // 9. LSC reset
    @(negedge uclk) lsc_ureset_n = 0;
    seen = 0;
    for (t = 0; t < 400; t++) begin
      lsc_cycles(1);
      if (!lsc_ldown_n) seen = 1;
      if (t == 20) lsc_ureset_n = 1;
    end
    check(seen == 1, "LSC link down during LSC reset");
    wait_link_up("LSC reset");
    if (seen) n_lsc_reset++;
    blocks(3, 70, "after LSC reset");

    // 10. broken forward fibre: link goes down and stays down until a reset
    fwd_conn = 0;
    lsc_cycles(300);
    check(!ldc_ldown_n && !lsc_ldown_n, "link down on both ends with fibre broken");
    // return lines changed while the link is down must not reach LRL yet
    begin
      logic [3:0] held;
      held = lrl;
      @(negedge ldc_xclk) url = ~held;
      lsc_cycles(100);
      check(lrl == held, "LRL unaltered while the link is down");
      if (lrl == held) n_lrl_hold++;
    end
    fwd_conn = 1;
    lsc_cycles(HP_WAIT);
    check(!ldc_ldown_n && !lsc_ldown_n, "link stays down after fibre repaired");
    check(n_rldwn > 0, "LSC sends link-down command");
    if (!ldc_ldown_n && !lsc_ldown_n) n_down_latched++;
    @(negedge uclk) lsc_ureset_n = 0;
    lsc_cycles(20);
    @(negedge uclk) lsc_ureset_n = 1;
    wait_link_up("fibre repair and LSC reset");
    lsc_cycles(60);
    check(lrl == url, "LRL follows the return lines again after link up");
    blocks(4, 80, "after fibre repair");

    // mechanism counts
    $display("[%s] data=%0d ctrl=%0d crc_before_ctrl=%0d crc_periodic=%0d xoff_stall=%0d",
             NAME, n_data, n_ctrl, n_crc_ctrl, n_crc_period, n_xoff_stall);
    $display("[%s] lrl_held_while_down=%0d", NAME, n_lrl_hold);
    $display("[%s] return_lines=%0d crc_error=%0d test_mode=%0d ldc_reset=%0d lsc_reset=%0d",
             NAME, n_lrl, n_crc_err, n_test, n_ldc_reset, n_lsc_reset);
    $display("[%s] down_latched=%0d power_up=%0d TON=%0d TOFF=%0d RRES=%0d RLDWN=%0d",
             NAME, n_down_latched, n_power_up, n_ton, n_toff, n_rres, n_rldwn);
    check(n_data > 0, "mechanism: data words");
    check(n_ctrl > 0, "mechanism: control words");
    check(n_crc_ctrl > 0, "mechanism: CRC before control word");
    check(n_crc_period > 0, "mechanism: periodic CRC");
    check(n_xoff_stall > 0, "mechanism: XOFF stall");
    check(n_lrl > 0, "mechanism: return lines");
    check(n_lrl_hold > 0, "mechanism: LRL held while link down");
    check(n_crc_err > 0, "mechanism: CRC error report");
    check(n_test > 0, "mechanism: test mode");
    check(n_ldc_reset > 0, "mechanism: LDC reset");
    check(n_lsc_reset > 0, "mechanism: LSC reset");
    check(n_down_latched > 0, "mechanism: link down held until reset");
    check(n_power_up > 0, "mechanism: power-up");
    check(n_rres > 0 && n_rldwn > 0, "mechanism: RRES and RLDWN commands");
    done = 1'b1;
  end
endmodule
