// tb_async_fifo: writes random 33-bit words on one clock and reads them on an
// unrelated clock, comparing the order and contents with a queue model.
// Checks that 'full' stops at DEPTH words, that almost_full leaves exactly
// AF_MARGIN free entries (writes continue after it rises until full), and that
// empty/full recover.  Clocks: 40 MHz-like write, 33 MHz-like read, then the
// reverse ratio.
module tb_async_fifo;
  logic wclk = 0, rclk = 0, rst_n = 0;
  logic wr = 0, rd = 0;
  logic [32:0] wdata = 0, rdata;
  logic full, almost_full, empty;
  int checks = 0, failures = 0;
  logic [32:0] model[$];
  int wper = 12, rper = 15;
  int after_af = 0, max_after_af = 0;

  async_fifo #(.WIDTH(33), .DEPTH(8), .AF_MARGIN(2)) dut (
    .wclk, .wrst_n(rst_n), .wr, .wdata, .full, .almost_full,
    .rclk, .rrst_n(rst_n), .rd, .rdata, .empty);

  always #(wper) wclk = ~wclk;
  always #(rper) rclk = ~rclk;

  task automatic check(input logic cond, input string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL: %s", what); end
  endtask

  int phase = 0;   // 0: fill test, 1: random traffic
  int wcount = 0;
  // writer
  always @(posedge wclk) begin
    if (rst_n) begin
      if (wr && !full) begin
        model.push_back(wdata);
        wcount++;
        if (almost_full) after_af++;
      end
      if (!almost_full) after_af = 0;
      if (after_af > max_after_af) max_after_af = after_af;
      #1;
      wr    = (phase == 0) ? !full : (phase == 1) ? (($urandom_range(0, 2) != 0) && !full) : 1'b0;
      wdata = {$urandom_range(0, 1), $urandom()};
    end
  end

  // reader
  always @(posedge rclk) begin
    if (rst_n) begin
      if (rd && !empty) begin
        check(model.size() > 0, "read with model empty");
        if (model.size() > 0) check(rdata == model.pop_front(), "read data order");
      end
      #1;
      rd = (phase == 0) ? 1'b0 : (phase == 1) ? (($urandom_range(0, 2) != 0) && !empty) : !empty;
    end
  end

  initial begin
    #100 rst_n = 1;
    // phase 0: fill without reading
    repeat (40) @(posedge wclk);
    check(full, "full after filling");
    check(model.size() == 8, $sformatf("holds DEPTH words (%0d)", model.size()));
    check(max_after_af == 2, $sformatf("two writes after almost_full (%0d)", max_after_af));
    phase = 1;
    repeat (2000) @(posedge rclk);
    wper = 17; rper = 9;
    repeat (2000) @(posedge rclk);
    phase = 2;  // stop writing, drain
    repeat (60) @(posedge rclk);
    check(empty, "empty after drain");
    check(model.size() == 0, "model drained");
    check(wcount > 1000, $sformatf("traffic moved (%0d words)", wcount));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #2000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
