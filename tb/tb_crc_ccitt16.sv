// tb_crc_ccitt16: checks the 16-bit look-ahead CRC register against a
// bit-serial model of the CRC-CCITT shift register (x^16+x^12+x^5+1, data bit
// 0 first, feedback from the last cell into cells 15, 11 and 4).  The serial
// register S relates to the look-ahead register R by S = bit-reverse(R).
// Also checks the preset value, 'clear', hold when en is low, and that
// folding in the checksum word bit-reverse(R) leaves zero.
module tb_crc_ccitt16;
  import odin_pkg::*;
  logic clk = 0, rst_n = 0, clear = 0, en = 0;
  logic [15:0] data = 0, crc, crc_next;
  int checks = 0, failures = 0;

  crc_ccitt16 dut (.clk, .rst_n, .clear, .en, .data, .crc, .crc_next);

  always #5 clk = ~clk;

  function automatic logic [15:0] serial_step(input logic [15:0] s, input logic [15:0] d);
    for (int i = 0; i < 16; i++) begin
      logic fb;
      fb = s[0] ^ d[i];
      s  = s >> 1;
      if (fb) s = s ^ 16'h8408;
    end
    return s;
  endfunction

  function automatic logic [15:0] rev(input logic [15:0] v);
    for (int i = 0; i < 16; i++) rev[i] = v[15-i];
  endfunction

  task automatic check(input logic cond, input string what);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  logic [15:0] model;
  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1;
    @(posedge clk); #1;
    check(crc == 16'hFFFF, "preset to all ones");
    model = 16'hFFFF;   // all ones is its own bit-reverse
    for (int n = 0; n < 300; n++) begin
      data = $urandom(); en = ($urandom_range(0, 3) != 0);
      @(posedge clk); #1;
      if (en) model = rev(serial_step(rev(model), data));
      check(crc == model, $sformatf("word %0d crc %h expected %h", n, crc, model));
      if (n % 37 == 36) begin
        data = rev(crc); en = 1; #1;
        check(crc_next == 16'h0000, "checksum residue zero");
        clear = 1; @(posedge clk); #1; clear = 0;
        model = 16'hFFFF;
        check(crc == 16'hFFFF, "clear presets");
      end
    end
    // a known value: one word 0x0000 after preset
    clear = 1; en = 1; data = 16'h1234; @(posedge clk); #1; clear = 0;
    check(crc == 16'hFFFF, "clear wins over en");
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
