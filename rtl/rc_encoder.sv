// rc_encoder: ODIN return-channel transmitter on the Link Destination Card.
//
// Every PERIOD (8) cycles it samples the four return lines URL[3:0], the flow
// control request XOFF, and the LDC state (down / reset request) into a 16-bit
// word and sends it as one G-Link data frame (flag low); the other PERIOD-1
// cycles are idle.  The single word among idles helps the LSC's receiver lock
// and sets the return-line sampling rate (5 MHz at 40 MHz, 8 MHz at 64 MHz).
// Every field is sent twice (bits 2i+1 and 2i) so the receiver can discard a
// corrupted word:
//   [1:0] URL0  [3:2] URL1  [5:4] URL2  [7:6] URL3
//   [9:8] XOFF  [11:10] LDC down  [13:12] remote reset  [15:14] reserved, 00
// The bit map, the doubling and the one-in-eight rate follow ODIN.  The word
// leaves on a register, one cycle after the inputs are sampled.
module rc_encoder
  import odin_pkg::*;
#(
  parameter int PERIOD = RC_WORD_PERIOD
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic [3:0]  url,
  input  logic        xoff,
  input  logic        ldc_down,
  input  logic        ldc_reset,
  output glink_word_t tx
);
  localparam int SW = (PERIOD > 1) ? $clog2(PERIOD) : 1;
  logic [SW-1:0] slot;
  logic [6:0]    fields;
  logic [15:0]   doubled;

  assign fields = {ldc_reset, ldc_down, xoff, url};
  always_comb begin
    doubled = '0;
    for (int i = 0; i < 7; i++) doubled[2*i +: 2] = {2{fields[i]}};
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      slot <= '0;
      tx   <= GLINK_IDLE;
    end else begin
      slot <= (slot == SW'(PERIOD-1)) ? '0 : slot + 1'b1;
      if (slot == '0) tx <= '{dav: 1'b1, cav: 1'b0, flag: 1'b0, d: doubled};
      else            tx <= GLINK_IDLE;
    end
  end
endmodule
