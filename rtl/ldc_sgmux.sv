// ldc_sgmux: output stage of the single-channel LDC.
//
// The single-channel link runs its G-Link at 64 MHz, above the 40 MHz S-LINK
// limit for LCLK, so LCLK is the recovered clock RX_CLK divided by two.  The
// S-LINK outputs LD/LCTRL/LWEN/LDERR are registered on RX_CLK, but only on an
// edge where LCLK is (was) high, i.e. in the same cycle LCLK falls.  They then
// stay stable for two RX_CLK cycles around the next rising edge of LCLK,
// which gives the ROMB a setup and a hold time of about one RX_CLK period.  A
// two-word queue holds words that arrive in the other LCLK phase; one word
// per two RX_CLK cycles, the channel's maximum rate, always fits.
// lwen is high for one LCLK cycle per word.  The divide-by-two and the rule
// "change LD only while LCLK is high" follow ODIN; the queue is this
// implementation's own.
module ldc_sgmux
  import odin_pkg::*;
(
  input  logic        clk,         // RX_CLK
  input  logic        rst_n,
  input  logic        in_valid,
  input  slink_word_t in_word,
  input  logic        in_err,
  output logic        lclk,
  output logic        lwen,
  output slink_word_t ld,
  output logic        lderr,
  output logic        overflow
);
  typedef struct packed {
    slink_word_t w;
    logic        err;
  } ent_t;

  ent_t        q [2];
  logic [1:0]  wp, rp;
  logic        divclk;
  logic        nonempty;

  assign lclk     = divclk;
  assign nonempty = (wp != rp);

  always_ff @(posedge clk) begin
    if (in_valid) q[wp[0]] <= '{w: in_word, err: in_err};
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      divclk   <= 1'b0;
      wp       <= '0;
      rp       <= '0;
      lwen     <= 1'b0;
      ld       <= '0;
      lderr    <= 1'b0;
      overflow <= 1'b0;
    end else begin
      divclk   <= !divclk;
      overflow <= 1'b0;
      if (in_valid) begin
        if ((wp - rp) == 2'd2) overflow <= 1'b1;
        else                   wp <= wp + 1'b1;
      end
      if (divclk) begin
        lwen <= nonempty;
        if (nonempty) begin
          ld    <= q[rp[0]].w;
          lderr <= q[rp[0]].err;
          rp    <= rp + 1'b1;
        end else begin
          lderr <= 1'b0;
        end
      end
    end
  end
endmodule
