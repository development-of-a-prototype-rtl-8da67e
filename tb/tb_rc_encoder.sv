// tb_rc_encoder: checks the return-channel word format (each field doubled:
// URL0..3 in [7:0], XOFF [9:8], LDC down [11:10], remote reset [13:12],
// reserved [15:14] = 00), that exactly one data frame with flag low is sent
// every eight cycles with idles between, and that each word carries the inputs
// sampled one cycle before it appears.
module tb_rc_encoder;
  import odin_pkg::*;
  logic clk = 0, rst_n = 0;
  logic [3:0] url = 0;
  logic xoff = 0, ldc_down = 0, ldc_reset = 0;
  glink_word_t tx;
  int checks = 0, failures = 0;

  rc_encoder dut (.clk, .rst_n, .url, .xoff, .ldc_down, .ldc_reset, .tx);

  always #5 clk = ~clk;

  task automatic check(input logic cond, input string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL @%0t: %s", $time, what); end
  endtask

  function automatic logic [15:0] expect_word(input logic [3:0] u, input logic x, input logic d,
                                               input logic r);
    logic [15:0] w;
    w = 16'h0000;
    for (int i = 0; i < 4; i++) if (u[i]) w[2*i +: 2] = 2'b11;
    if (x) w[9:8]   = 2'b11;
    if (d) w[11:10] = 2'b11;
    if (r) w[13:12] = 2'b11;
    return w;
  endfunction

  logic [15:0] exp_w;
  int last = -1, words = 0, cyc = 0;
  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1;
    repeat (400) begin
      @(posedge clk);
      exp_w = expect_word(url, xoff, ldc_down, ldc_reset);   // sampled at this edge
      #1;
      cyc++;
      if (tx.dav) begin
        words++;
        check(!tx.cav && !tx.flag, "data frame, flag low");
        check(tx.d == exp_w, $sformatf("word %h expected %h", tx.d, exp_w));
        if (last >= 0) check(cyc - last == 8, $sformatf("period %0d", cyc - last));
        last = cyc;
      end else begin
        check(!tx.cav, "idle between words");
      end
      {url, xoff, ldc_down, ldc_reset} = 7'($urandom());
    end
    check(words >= 49, $sformatf("words sent: %0d", words));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
