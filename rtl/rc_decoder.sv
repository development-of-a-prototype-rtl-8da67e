// rc_decoder: ODIN return-channel receiver on the Link Source Card.
//
// Runs on the clock recovered by the return-channel G-Link receiver.  A word
// is accepted only if it is a data frame, the receiver reports no error, and
// every doubled field holds 00 or 11 (reserved bits [15:14] included); any
// other word is discarded whole.  An accepted word updates, one cycle later:
//   lrl[3:0]    the S-LINK return lines LRL[3:0] (they keep their value while
//               nothing valid arrives, e.g. when the link is down)
//   xoff        flow control from the LDC
//   rlup        low when the LDC reports itself down, high otherwise
//   ldc_reset   the LDC asks for a link reset
// Outputs start at 0 after reset (rlup low: the LDC is taken to be down until
// it says otherwise).  Field map and the discard rule follow ODIN.
module rc_decoder
  import odin_pkg::*;
(
  input  logic        clk,
  input  logic        rst_n,
  input  glink_word_t rx,
  input  logic        rx_error,
  output logic [3:0]  lrl,
  output logic        xoff,
  output logic        rlup,
  output logic        ldc_reset,
  output logic        word_ok,    // pulse: a word was accepted
  output logic        word_bad    // pulse: a data word was discarded
);
  logic pairs_ok;
  logic [7:0] f;

  always_comb begin
    pairs_ok = 1'b1;
    for (int i = 0; i < 8; i++) begin
      f[i] = rx.d[2*i];
      if (rx.d[2*i+1] != rx.d[2*i]) pairs_ok = 1'b0;
    end
  end

  assign word_ok  = rx.dav && !rx.cav && !rx_error && pairs_ok && !f[7];
  assign word_bad = rx.dav && !word_ok;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      lrl       <= '0;
      xoff      <= 1'b0;
      rlup      <= 1'b0;
      ldc_reset <= 1'b0;
    end else if (word_ok) begin
      lrl       <= f[3:0];
      xoff      <= f[4];
      rlup      <= !f[5];
      ldc_reset <= f[6];
    end
  end
endmodule
