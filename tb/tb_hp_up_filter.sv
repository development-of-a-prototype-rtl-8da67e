// tb_hp_up_filter: with a 4-bit counter, checks that hp_up rises exactly
// 2^4-1 cycles after the synchronised inputs are all high (17 cycles after the
// inputs change, counting the two synchroniser stages), that a one-cycle
// glitch on any input drops hp_up and restarts the full count, and that
// hp_up stays low while any input is low.
module tb_hp_up_filter;
  localparam int N = 4;
  logic clk = 0, rst_n = 0, tx_locked = 0;
  logic [1:0] rx_ready = 0;
  logic hp_up;
  int checks = 0, failures = 0;

  hp_up_filter #(.NRX(2), .CNT_BITS(N)) dut (.clk, .rst_n, .tx_locked, .rx_ready, .hp_up);

  always #5 clk = ~clk;

  task automatic check(input logic cond, input string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL: %s", what); end
  endtask

  // cycles from the input edge until hp_up is seen high
  task automatic measure(output int n);
    n = 0;
    while (!hp_up && n < 200) begin @(posedge clk); #1; n++; end
  endtask

  int n;
  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1;
    tx_locked = 1; rx_ready = 2'b01;
    repeat (40) begin @(posedge clk); #1; check(!hp_up, "low while one receiver not ready"); end
    rx_ready = 2'b11;
    measure(n);
    check(n == (2**N - 1) + 2, $sformatf("rise after %0d cycles, expected %0d", n, 2**N + 1));
    repeat (5) begin @(posedge clk); #1; check(hp_up, "stays high"); end
    // one-cycle glitch on tx_locked
    tx_locked = 0; @(posedge clk); #1; tx_locked = 1;
    @(posedge clk); #1;
    check(!hp_up, "glitch drops hp_up");
    measure(n);
    check(n == (2**N - 1) + 1, $sformatf("full recount after glitch: %0d", n));
    // glitch on a receiver
    rx_ready[1] = 0; @(posedge clk); #1; rx_ready[1] = 1;
    @(posedge clk); #1;
    check(!hp_up, "receiver glitch drops hp_up");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
