// hp_up_filter: debounces the G-Link status pins into the 'hp_up' signal used
// by the LSC and LDC power-up/reset state machines.  A CNT_BITS-bit counter
// (21 bits in ODIN, about 52 ms at 40 MHz) runs while the transmitter-locked
// and every receiver-ready input are high; it restarts from zero as soon as any
// of them is low, and hp_up is high only while the counter is saturated.  This
// filters out the short loss-of-lock glitches seen when a fibre is plugged in
// while the link is powered.  The inputs come from other chips and are
// synchronised first; hp_up rises 2^CNT_BITS-1+3 cycles after the inputs settle
// high and falls 2 cycles after one of them drops.  The counter width follows
// ODIN; restart-on-low is this implementation's reading of 'filter'.
module hp_up_filter #(
  parameter int NRX      = 1,
  parameter int CNT_BITS = 21
) (
  input  logic           clk,
  input  logic           rst_n,
  input  logic           tx_locked,
  input  logic [NRX-1:0] rx_ready,
  output logic           hp_up
);
  logic [NRX:0] status_s;
  logic [CNT_BITS-1:0] cnt;

  sync_2ff #(.WIDTH(NRX+1)) u_sync (.clk(clk), .rst_n(rst_n), .d({tx_locked, rx_ready}), .q(status_s));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)              cnt <= '0;
    else if (!(&status_s))   cnt <= '0;
    else if (!(&cnt))        cnt <= cnt + 1'b1;
  end

  assign hp_up = (&cnt) & (&status_s);
endmodule
