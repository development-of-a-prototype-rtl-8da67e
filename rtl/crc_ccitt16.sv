// crc_ccitt16: CRC-CCITT (x^16+x^12+x^5+1) register that folds in one 16-bit
// G-Link word per clock, as used on every ODIN forward channel at both ends.
// The next value comes from the 16-bit look-ahead equations (odin_pkg::
// crc16_next), data bit 0 first.  The register is preset to all ones at reset
// and on 'clear' (clear wins over en); both the preset value and the polynomial
// follow the ODIN specification.  'crc_next' is the value the register would
// take if 'data' were folded in now: a receiver that folds in the received
// checksum word tests crc_next == 0.  One cycle per word, no latency beyond the
// register itself.
module crc_ccitt16 #(
  parameter logic [15:0] INIT = odin_pkg::CRC_INIT
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        clear,
  input  logic        en,
  input  logic [15:0] data,
  output logic [15:0] crc,
  output logic [15:0] crc_next
);
  assign crc_next = odin_pkg::crc16_next(crc, data);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)     crc <= INIT;
    else if (clear) crc <= INIT;
    else if (en)    crc <= crc_next;
  end
endmodule
