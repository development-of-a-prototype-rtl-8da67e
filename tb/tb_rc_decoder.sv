// tb_rc_decoder: sends return-channel words built from random field values and
// checks LRL, XOFF, rlup and the LDC reset request after each.  Words with one
// broken bit pair, with the receiver error flag, as control frames, or with the
// reserved bits set must be discarded whole (outputs unchanged).
module tb_rc_decoder;
  import odin_pkg::*;
  logic clk = 0, rst_n = 0;
  glink_word_t rx = GLINK_IDLE;
  logic rx_error = 0;
  logic [3:0] lrl;
  logic xoff, rlup, ldc_reset, word_ok, word_bad;
  int checks = 0, failures = 0;

  rc_decoder dut (.clk, .rst_n, .rx, .rx_error, .lrl, .xoff, .rlup, .ldc_reset, .word_ok,
    .word_bad);

  always #5 clk = ~clk;

  task automatic check(input logic cond, input string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL @%0t: %s", $time, what); end
  endtask

  function automatic logic [15:0] mk(input logic [6:0] f);
    logic [15:0] w = 0;
    for (int i = 0; i < 7; i++) w[2*i +: 2] = {2{f[i]}};
    return w;
  endfunction

  task automatic send(input logic [15:0] d, input logic cav, input logic err);
    rx = '{dav: !cav, cav: cav, flag: 1'b0, d: d};
    rx_error = err;
    @(posedge clk); #1;
    rx = GLINK_IDLE; rx_error = 0;
  endtask

  logic [6:0] cur, f;
  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1; #1;
    check(!rlup && !xoff && lrl == 0, "reset values");
    cur = 0;
    for (int n = 0; n < 200; n++) begin
      f = 7'($urandom());
      case ($urandom_range(0, 4))
        0: begin   // one broken pair
             logic [15:0] w; w = mk(f); w[2*$urandom_range(0, 6)] ^= 1'b1;
             send(w, 0, 0);
           end
        1: send(mk(f), 0, 1);              // receiver error
        2: send(mk(f), 1, 0);              // control frame
        3: send(mk(f) | 16'hC000, 0, 0);   // reserved bits set
        default: begin send(mk(f), 0, 0); cur = f; end
      endcase
      repeat ($urandom_range(0, 7)) @(posedge clk);
      #1;
      check(lrl == cur[3:0] && xoff == cur[4] && rlup == !cur[5] && ldc_reset == cur[6],
            $sformatf("outputs after word %0d", n));
    end
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
