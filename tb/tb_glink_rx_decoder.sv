// tb_glink_rx_decoder: feeds one receive decoder with G-Link words made by the
// testbench (data/control halves, commands, CRCC + checksum from a bit-serial
// CRC model) and checks the rebuilt S-LINK words, the control-word parity
// check, command decoding, and the checksum check.  Errors are injected on
// purpose: a flipped data bit inside a block (checksum must fail), a wrong
// parity bit, a lone half word, and the receiver error flag.  Blocks without
// injected errors must pass their checksum.
module tb_glink_rx_decoder;
  import odin_pkg::*;
  logic clk = 0, rst_n = 0;
  glink_word_t rx = GLINK_IDLE;
  logic rx_error = 0;
  logic out_valid, out_par_err, cmd_valid, crc_checked, crc_err;
  slink_word_t out_word;
  odin_cmd_e cmd;
  int checks = 0, failures = 0;

  glink_rx_decoder dut (.clk, .rst_n, .rx, .rx_error, .out_valid, .out_word, .out_par_err,
    .cmd_valid, .cmd, .crc_checked, .crc_err);

  always #5 clk = ~clk;

  task automatic check(input logic cond, input string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL @%0t: %s", $time, what); end
  endtask

  function automatic logic [15:0] serial_step(input logic [15:0] s, input logic [15:0] d);
    for (int i = 0; i < 16; i++) begin
      logic fb;
      fb = s[0] ^ d[i];
      s  = s >> 1;
      if (fb) s = s ^ 16'h8408;
    end
    return s;
  endfunction

  logic [15:0] s_crc = 16'hFFFF;
  slink_word_t exp_words[$];
  logic        exp_par[$];
  odin_cmd_e   exp_cmds[$];
  int crc_errs = 0, crc_checks = 0, words_out = 0;

  task automatic put(input glink_word_t w, input logic err = 0);
    @(negedge clk);
    rx = w; rx_error = err;
    @(negedge clk);
    rx = GLINK_IDLE; rx_error = 0;
  endtask
  // two halves back to back
  task automatic put_word(input logic [31:0] d, input logic flag, input logic flip = 0);
    @(negedge clk);
    rx = '{1'b1, 1'b0, flag, d[31:16]};
    if (flag) s_crc = serial_step(s_crc, d[31:16]);
    @(negedge clk);
    rx = '{1'b1, 1'b0, flag, d[15:0] ^ {15'b0, flip}};
    if (flag) s_crc = serial_step(s_crc, d[15:0]);
    @(negedge clk);
    rx = GLINK_IDLE;
  endtask
  task automatic put_cmd(input odin_cmd_e c);
    @(negedge clk);
    rx = '{1'b0, 1'b1, 1'b0, {6'b0, c}};
    exp_cmds.push_back(c);
    if (c == CMD_RRES) s_crc = 16'hFFFF;
    @(negedge clk);
    rx = GLINK_IDLE;
  endtask
  task automatic put_crc();
    @(negedge clk);
    rx = '{1'b0, 1'b1, 1'b0, {6'b0, CMD_CRCC}};
    exp_cmds.push_back(CMD_CRCC);
    @(negedge clk);
    rx = '{1'b1, 1'b0, 1'b1, s_crc};
    s_crc = 16'hFFFF;
    @(negedge clk);
    rx = GLINK_IDLE;
  endtask

  // monitor
  always @(posedge clk) begin
    if (rst_n) begin
      if (out_valid) begin
        words_out++;
        check(exp_words.size() > 0, "word expected");
        if (exp_words.size() > 0) begin
          check(out_word == exp_words.pop_front(), $sformatf("word %h", out_word));
          if (out_word.ctrl) check(out_par_err == exp_par.pop_front(), "parity flag");
        end
      end
      if (cmd_valid) begin
        check(exp_cmds.size() > 0 && cmd == exp_cmds.pop_front(), "command");
      end
      if (crc_checked) crc_checks++;
      if (crc_err) crc_errs++;
    end
  end

  int e0, c0;
  logic [31:0] d;
  logic bad_par;
  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1;
    put_cmd(CMD_RRES);
    put_cmd(CMD_TON);
    put_cmd(CMD_TOFF);
    put_cmd(CMD_RLDWN);
    for (int blk = 0; blk < 60; blk++) begin
      int kind;
      kind = (blk < 10) ? 0 : $urandom_range(0, 4);
      e0 = crc_errs; c0 = crc_checks;
      // begin-of-block control word, sometimes with bad parity
      d = $urandom(); bad_par = (kind == 2);
      d[3:0] = cw_parity(d) ^ {3'b0, bad_par};
      exp_words.push_back('{1'b1, d}); exp_par.push_back(bad_par);
      put_word(d, 1'b0);
      for (int i = 0; i < $urandom_range(1, 12); i++) begin
        d = $urandom();
        if (kind == 1 && i == 0) begin
          put_word(d, 1'b1, 1'b1);             // corrupted on the line
          exp_words.push_back('{1'b0, d ^ 32'd1});
          exp_words.delete(exp_words.size() - 1);
          exp_words.push_back('{1'b0, d ^ 32'd1});
        end else begin
          exp_words.push_back('{1'b0, d});
          put_word(d, 1'b1);
        end
      end
      if (kind == 3) begin   // lone half word
        put('{1'b1, 1'b0, 1'b1, 16'h5555});
      end
      if (kind == 4) begin   // receiver error flag
        put('{1'b1, 1'b0, 1'b1, 16'h0F0F}, 1'b1);
      end
      put_crc();
      repeat (3) @(posedge clk);
      check(crc_checks == c0 + 1, "checksum checked");
      if (kind == 1 || kind == 3 || kind == 4)
        check(crc_errs > e0, $sformatf("block %0d kind %0d: error flagged", blk, kind));
      else
        check(crc_errs == e0, $sformatf("block %0d kind %0d: no error", blk, kind));
      if (kind == 3 || kind == 4) put_cmd(CMD_RRES);
    end
    repeat (5) @(posedge clk);
    check(exp_words.size() == 0 && exp_cmds.size() == 0, "everything received");
    check(words_out > 200, $sformatf("words out %0d", words_out));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
