// tb_ldc_merge: two channels deliver the words of a known sequence (even
// words on A, odd words on B, at most one word per channel every two cycles),
// with channel B skewed by 0, 1 or 2 cycles relative to A.  The merge output
// must be the original sequence, at most one word per cycle.  Also checks the
// error report on control words (LD[3]/LD[2] = CRC error of A/B, LD[1] =
// parity error, LDERR), the walking-one test-pattern check with one planted
// error, rlup after RLDWN and other commands, and the clearing done by RRES.
module tb_ldc_merge;
  import odin_pkg::*;
  logic clk = 0, rst_n = 0;
  logic        [1:0] in_valid = 0, in_par_err = 0, in_crc_err = 0;
  slink_word_t [1:0] in_word = '0;
  logic cmd_valid = 0;
  odin_cmd_e cmd = CMD_RRES;
  logic out_valid, lderr, test_mode, test_err, rlup, lsc_reset, overflow;
  slink_word_t out_word;
  int checks = 0, failures = 0;

  ldc_merge #(.CHANNELS(2), .QDEPTH(4)) dut (.clk, .rst_n, .in_valid, .in_word, .in_par_err,
    .in_crc_err, .cmd_valid, .cmd, .out_valid, .out_word, .lderr, .test_mode, .test_err,
    .rlup, .lsc_reset, .overflow);

  always #5 clk = ~clk;

  task automatic check(input logic cond, input string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL @%0t: %s", $time, what); end
  endtask

  typedef struct { slink_word_t w; logic par; logic crc_err; } ent_t;
  ent_t seq[$];                   // words in sent order
  slink_word_t expq[$];
  logic        experr[$];

  // one channel: sends words idx = c, c+2, ... at the shared schedule + skew
  int sched[$];
  task automatic run_channel(input int c, input int skew);
    int t = 0;
    for (int k = c; k < seq.size(); k += 2) begin
      int target;
      target = sched[k/2] + skew;
      while (t < target) begin @(negedge clk); t++; in_valid[c] = 0; in_crc_err[c] = 0; end
      in_valid[c]   = 1;
      in_word[c]    = seq[k].w;
      in_par_err[c] = seq[k].par;
      in_crc_err[c] = seq[k].crc_err;
      @(negedge clk); t++;
      in_valid[c] = 0; in_crc_err[c] = 0;
    end
  endtask

  // expected output with error report
  task automatic build_expect();
    logic [1:0] lat = 0;
    for (int k = 0; k < seq.size(); k++) begin
      slink_word_t w;
      w = seq[k].w;
      if (seq[k].crc_err) lat[k % 2] = 1;
      if (w.ctrl) begin
        w.d[3] = lat[0]; w.d[2] = lat[1]; w.d[1] = seq[k].par; w.d[0] = 0;
        experr.push_back(|lat || seq[k].par);
        lat = 0;
      end else experr.push_back(0);
      expq.push_back(w);
    end
  endtask

  int outs = 0, same_cycle_pairs = 0;
  always @(posedge clk) begin
    if (rst_n && out_valid) begin
      outs++;
      if (expq.size() == 0) check(0, "unexpected output");
      else begin
        slink_word_t e; logic ee;
        e = expq.pop_front(); ee = experr.pop_front();
        check(out_word == e, $sformatf("out %h expected %h", out_word, e));
        if (!test_mode) check(lderr == ee, "lderr");
      end
    end
    if (rst_n) check(!overflow, "no queue overflow");
    if (in_valid == 2'b11) same_cycle_pairs++;
  end

  task automatic send_cmd(input odin_cmd_e c);
    @(negedge clk); cmd_valid = 1; cmd = c;
    @(negedge clk); cmd_valid = 0;
  endtask

  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1;
    send_cmd(CMD_RLDWN);
    @(negedge clk); check(!rlup, "rlup low after RLDWN");
    send_cmd(CMD_RRES);
    @(negedge clk); check(rlup, "rlup high after other command");
    for (int skew = 0; skew < 3; skew++) begin
      int t;
      seq.delete(); sched.delete();
      for (int k = 0; k < 300; k++) begin
        ent_t e;
        e.w.ctrl = ($urandom_range(0, 9) == 0);
        e.w.d = $urandom();
        e.par = e.w.ctrl && ($urandom_range(0, 3) == 0);
        e.crc_err = ($urandom_range(0, 29) == 0);
        seq.push_back(e);
      end
      // errors arrive when their word does; keep them away from control words
      // so that the block they belong to is unambiguous under skew
      for (int k = 0; k < 300; k++)
        for (int j = k - 3; j <= k + 3; j++)
          if (j >= 0 && j < 300 && seq[j].w.ctrl) seq[k].crc_err = 0;
      t = 1;
      for (int k = 0; k < 150; k++) begin t += 2 + (($urandom_range(0, 3) == 0) ? 1 : 0); sched.push_back(t); end
      build_expect();
      fork
        run_channel(0, 0);
        run_channel(1, skew);
      join
      repeat (6) @(negedge clk);
      check(expq.size() == 0, $sformatf("skew %0d: all words out", skew));
    end
    check(same_cycle_pairs > 50, "B words arrived in the same cycle as A words");
    // test mode: walking one, one error planted
    send_cmd(CMD_TON);
    check(test_mode, "test mode on");
    seq.delete(); sched.delete();
    for (int k = 0; k < 64; k++) begin
      ent_t e;
      e.w.ctrl = 0; e.w.d = (32'd1 << (k % 32)); e.par = 0; e.crc_err = 0;
      if (k == 40) e.w.d = 32'hDEAD0000;
      seq.push_back(e);
    end
    for (int k = 0; k < 32; k++) sched.push_back(1 + 2*k);
    build_expect();
    fork run_channel(0, 0); run_channel(1, 1); join
    repeat (4) @(negedge clk);
    check(test_err, "planted test-pattern error found");
    send_cmd(CMD_TOFF);
    check(!test_mode && test_err, "test mode off, error kept");
    send_cmd(CMD_RRES);
    check(!test_err, "RRES clears test error");
    check(outs >= 900, $sformatf("outputs %0d", outs));
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
