// tb_ldc_sgmux: words arrive at up to one per two RX_CLK cycles in either
// phase of the divided clock.  At every rising edge of LCLK (= RX_CLK / 2) the
// testbench samples LWEN/LD like the read-out board would and checks the words
// arrive complete and in order.  It also checks that LCLK has half the RX_CLK
// frequency and that LD changes only on RX_CLK edges where LCLK falls, so LD
// is stable for a full RX_CLK cycle before and after each LCLK rising edge.
module tb_ldc_sgmux;
  import odin_pkg::*;
  logic clk = 0, rst_n = 0;
  logic in_valid = 0, in_err = 0;
  slink_word_t in_word = '0;
  logic lclk, lwen, lderr, overflow;
  slink_word_t ld;
  int checks = 0, failures = 0;

  ldc_sgmux dut (.clk, .rst_n, .in_valid, .in_word, .in_err, .lclk, .lwen, .ld, .lderr,
    .overflow);

  always #8 clk = ~clk;   // 64 MHz-like RX_CLK

  task automatic check(input logic cond, input string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL @%0t: %s", $time, what); end
  endtask

  slink_word_t expq[$];
  logic        experr[$];
  int got = 0, lclk_rises = 0, clk_edges = 0;

  always @(posedge lclk) if (rst_n) begin
    lclk_rises++;
    if (lwen) begin
      got++;
      check(expq.size() > 0, "word expected");
      if (expq.size() > 0) begin
        check(ld == expq.pop_front(), "LD in order");
        check(lderr == experr.pop_front(), "LDERR travels with its word");
      end
    end
  end

  // LD may change only where LCLK falls
  slink_word_t ld_prev;
  logic lclk_prev, lwen_prev;
  always @(posedge clk) begin
    clk_edges++;
    #1;
    if (rst_n && (ld != ld_prev || lwen != lwen_prev))
      check(lclk_prev && !lclk, "LD/LWEN change only when LCLK falls");
    ld_prev = ld; lwen_prev = lwen; lclk_prev = lclk;
    if (rst_n) check(!overflow, "no overflow");
  end

  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int n = 0; n < 400; n++) begin
      @(negedge clk);
      in_valid = 1; in_word = {1'($urandom()), $urandom()}; in_err = ($urandom_range(0, 7) == 0);
      expq.push_back(in_word); experr.push_back(in_err);
      @(negedge clk);
      in_valid = 0;
      repeat ($urandom_range(0, 2)) @(negedge clk);
    end
    repeat (10) @(negedge clk);
    check(expq.size() == 0 && got == 400, $sformatf("all 400 words delivered (%0d)", got));
    check(clk_edges / lclk_rises == 2, "LCLK is RX_CLK / 2");
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
