// tb_glink_tx_encoder: drives random requests (data, control, CRC, command,
// with gaps) into one channel encoder and compares every G-Link word it puts
// out with a model built in the testbench: data and control words as two
// halves (MSB first, flag high only for data), commands as control frames with
// the code in [9:0], and for a CRC request the CRCC command followed by the
// bit-reversed CRC-CCITT of all data halves since the last checksum or RRES,
// computed with a bit-serial model.  Timing: first word one cycle after the
// request is taken, halves back to back, so back-to-back data requests give
// one S-LINK word every two cycles.
module tb_glink_tx_encoder;
  import odin_pkg::*;
  logic clk = 0, rst_n = 0;
  logic req_valid = 0, req_ready, data_sent;
  tx_req_e req_kind = REQ_DATA;
  logic [31:0] req_data = 0;
  glink_word_t tx;
  int checks = 0, failures = 0;

  glink_tx_encoder dut (.clk, .rst_n, .req_valid, .req_kind, .req_data, .req_ready, .tx,
    .data_sent);

  always #5 clk = ~clk;

  task automatic check(input logic cond, input string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL @%0t: %s", $time, what); end
  endtask

  // serial CRC, register kept in shift-register orientation
  logic [15:0] s_crc = 16'hFFFF;
  function automatic logic [15:0] serial_step(input logic [15:0] s, input logic [15:0] d);
    for (int i = 0; i < 16; i++) begin
      logic fb;
      fb = s[0] ^ d[i];
      s  = s >> 1;
      if (fb) s = s ^ 16'h8408;
    end
    return s;
  endfunction

  glink_word_t expq[$];
  int taken = 0, data_words = 0, busy_cycles = 0;

  // model: on every taken request, append the expected words
  always @(posedge clk) begin
    if (rst_n && req_valid && req_ready) begin
      taken++;
      unique case (req_kind)
        REQ_DATA: begin
          expq.push_back('{1'b1, 1'b0, 1'b1, req_data[31:16]});
          expq.push_back('{1'b1, 1'b0, 1'b1, req_data[15:0]});
          s_crc = serial_step(s_crc, req_data[31:16]);
          s_crc = serial_step(s_crc, req_data[15:0]);
          data_words++;
        end
        REQ_CTRL: begin
          expq.push_back('{1'b1, 1'b0, 1'b0, req_data[31:16]});
          expq.push_back('{1'b1, 1'b0, 1'b0, req_data[15:0]});
        end
        REQ_CRC: begin
          expq.push_back('{1'b0, 1'b1, 1'b0, {6'b0, CMD_CRCC}});
          expq.push_back('{1'b1, 1'b0, 1'b1, s_crc});   // serial register = reversed R
          s_crc = 16'hFFFF;
        end
        REQ_CMD: begin
          expq.push_back('{1'b0, 1'b1, 1'b0, {6'b0, req_data[9:0]}});
          if (req_data[9:0] == CMD_RRES) s_crc = 16'hFFFF;
        end
      endcase
    end
  end

  // checker: one cycle after taking, the words must come out in order
  glink_word_t e;
  always @(negedge clk) begin
    if (rst_n) begin
      if (expq.size() > 0 && (tx.dav || tx.cav)) begin
        e = expq.pop_front();
        check(tx == e, $sformatf("tx %h expected %h", tx, e));
      end else if (tx.dav || tx.cav) begin
        check(0, "unexpected word");
      end else begin
        check(expq.size() == 0, "idle while words pending");
      end
    end
  end

  odin_cmd_e cmds[5] = '{CMD_CRCC, CMD_TON, CMD_TOFF, CMD_RLDWN, CMD_RRES};
  int t0;
  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int n = 0; n < 600; n++) begin
      @(negedge clk); #1;
      req_valid = ($urandom_range(0, 3) != 0);
      case ($urandom_range(0, 9))
        0:       begin req_kind = REQ_CRC;  req_data = $urandom(); end
        1:       begin req_kind = REQ_CMD;  req_data = {22'b0, cmds[$urandom_range(1, 4)]}; end
        2, 3:    begin req_kind = REQ_CTRL; req_data = $urandom(); end
        default: begin req_kind = REQ_DATA; req_data = $urandom(); end
      endcase
    end
    // rate: 20 back-to-back data words take 40 cycles
    @(negedge clk); req_valid = 0;
    repeat (3) @(negedge clk);
    #1 t0 = taken;
    req_valid = 1; req_kind = REQ_DATA;
    repeat (40) begin @(negedge clk); #1 req_data = $urandom(); end
    req_valid = 0;
    check(taken - t0 == 20, $sformatf("20 words in 40 cycles (%0d)", taken - t0));
    req_valid = 1; req_kind = REQ_CRC;
    @(negedge clk); #1 req_valid = 0;
    repeat (5) @(negedge clk);
    check(expq.size() == 0, "all words sent");
    check(data_words > 100, "enough data words");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
