// tb_lsc_router: the router between a queue standing in for the input FIFO
// and two model channels that accept a two-word request every other cycle.
// Checks: broadcast of state-machine commands while the link is down; S-LINK
// words leave in FIFO order and in strict rotation A, B, A, ...; control words
// carry even parity in D[3:0]; a checksum request reaches both channels in the
// same cycle before every control word that follows data, and after
// CRC_WORDS*2 data words (CRC_WORDS = 8 here); nothing starts during XOFF; test
// mode sends TON, the walking-one pattern, a checksum and TOFF.
module tb_lsc_router;
  import odin_pkg::*;
  localparam int CH = 2, CW = 8;
  logic clk = 0, rst_n = 0;
  logic link_up = 0, cmd_valid = 0, xoff = 0, test_req = 0;
  odin_cmd_e cmd = CMD_RRES;
  slink_word_t fifo_rdata;
  logic fifo_empty, fifo_rd;
  logic    [CH-1:0] req_valid, req_ready;
  tx_req_e [CH-1:0] req_kind;
  logic    [CH-1:0][31:0] req_data;
  logic test_active, crc_sent;
  int checks = 0, failures = 0;

  lsc_router #(.CHANNELS(CH), .CRC_WORDS(CW)) dut (.clk, .rst_n, .link_up, .cmd_valid, .cmd,
    .xoff, .test_req, .fifo_rdata, .fifo_empty, .fifo_rd, .req_valid, .req_kind, .req_data,
    .req_ready, .test_active, .crc_sent);

  always #5 clk = ~clk;

  task automatic check(input logic cond, input string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL @%0t: %s", $time, what); end
  endtask

  // FIFO stand-in
  slink_word_t fq[$];
  assign fifo_empty = (fq.size() == 0);
  assign fifo_rdata = fifo_empty ? '0 : fq[0];

  // model channels: busy for one more cycle after a two-word request
  logic [CH-1:0] busy;
  assign req_ready = ~busy;

  slink_word_t sent[$];         // words the FIFO gave out, in order
  int exp_ch = 0, data_since = 0, words_since = 0;
  int crc_before_ctrl = 0, crc_periodic = 0, cmds_bcast = 0, xoff_violations = 0;
  int ton = 0, toff = 0, walk = 0, test_words = 0;
  logic in_test = 0;

  always @(posedge clk) begin
    if (!rst_n) busy <= '0;
    else begin
      for (int c = 0; c < CH; c++)
        busy[c] <= req_valid[c] && req_ready[c] && (req_kind[c] != REQ_CMD);
      // broadcasts
      if (&req_valid) begin
        check(req_kind[0] == req_kind[1] && req_data[0] == req_data[1], "broadcast identical");
        if (req_kind[0] == REQ_CRC) begin
          check(data_since > 0, "checksum only after data");
          if (words_since >= CW*CH) crc_periodic++;
          data_since = 0; words_since = 0;
        end else begin
          check(req_kind[0] == REQ_CMD, "broadcast is a command");
          if (req_data[0][9:0] == CMD_TON)  begin ton++; in_test = 1; walk = 0; end
          if (req_data[0][9:0] == CMD_TOFF) begin toff++; in_test = 0; end
          if (!link_up) cmds_bcast++;
        end
      end else begin
        for (int c = 0; c < CH; c++) if (req_valid[c]) begin
          check(c == exp_ch, $sformatf("rotation: channel %0d, expected %0d", c, exp_ch));
          exp_ch = (exp_ch + 1) % CH;
          check(link_up, "words only while up");
          if (xoff) xoff_violations++;
          if (in_test) begin
            check(req_kind[c] == REQ_DATA && req_data[c] == (32'd1 << walk), "walking one");
            walk = (walk + 1) % 32; test_words++; data_since++; words_since++;
          end else begin
            slink_word_t w;
            w = fq[0];
            if (w.ctrl) begin
              check(req_kind[c] == REQ_CTRL, "control request");
              check(req_data[c] == {w.d[31:4], ^w.d[31:25], ^w.d[24:18], ^w.d[17:11], ^w.d[10:4]},
                    "control word parity");
              check(data_since == 0, "checksum sent before control word");
              crc_before_ctrl++;
            end else begin
              check(req_kind[c] == REQ_DATA && req_data[c] == w.d, "data word in order");
              data_since++; words_since++;
              check(words_since <= CW*CH, "periodic checksum in time");
            end
          end
        end
      end
      if (fifo_rd) fq.pop_front();
    end
  end

  task automatic push_block(input int n);
    slink_word_t w;
    w.ctrl = 1; w.d = $urandom(); fq.push_back(w);
    for (int i = 0; i < n; i++) begin w.ctrl = 0; w.d = $urandom(); fq.push_back(w); end
    w.ctrl = 1; w.d = $urandom(); fq.push_back(w);
  endtask

  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1;
    // commands while down
    repeat (4) begin
      @(negedge clk); cmd_valid = 1; cmd = CMD_RLDWN;
      @(negedge clk); cmd_valid = 0;
      repeat (6) @(negedge clk);
    end
    check(cmds_bcast == 4, $sformatf("4 commands broadcast (%0d)", cmds_bcast));
    exp_ch = 0;
    link_up = 1;
    for (int b = 0; b < 20; b++) push_block($urandom_range(0, 40));
    fork
      begin
        repeat (300) begin
          @(negedge clk); xoff = ($urandom_range(0, 9) == 0);
        end
        xoff = 0;
      end
    join
    wait (fq.size() == 0);
    repeat (5) @(negedge clk);
    // test mode
    test_req = 1;
    repeat (150) @(negedge clk);
    test_req = 0;
    repeat (10) @(negedge clk);
    check(ton == 1 && toff == 1, "TON and TOFF sent");
    check(test_words > 60, $sformatf("test words %0d", test_words));
    check(!test_active, "test mode left");
    check(crc_before_ctrl >= 39, $sformatf("control words %0d", crc_before_ctrl));
    check(crc_periodic > 0, "periodic checksum happened");
    check(xoff_violations == 0, "no word started during XOFF");
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
