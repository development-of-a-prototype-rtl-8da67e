// sync_pulse: carries single-cycle events from a source clock domain to a
// destination clock domain.  Each source pulse flips a toggle flop; the toggle
// is synchronised with two flops and every change seen in the destination
// domain produces one destination-cycle pulse.  Source pulses must be at least
// three destination cycles apart to be counted separately.
module sync_pulse (
  input  logic src_clk,
  input  logic src_rst_n,
  input  logic src_pulse,
  input  logic dst_clk,
  input  logic dst_rst_n,
  output logic dst_pulse
);
  logic tog_src;
  logic tog_sync, tog_last;

  always_ff @(posedge src_clk or negedge src_rst_n) begin
    if (!src_rst_n)     tog_src <= 1'b0;
    else if (src_pulse) tog_src <= ~tog_src;
  end

  sync_2ff #(.WIDTH(1)) u_sync (.clk(dst_clk), .rst_n(dst_rst_n), .d(tog_src), .q(tog_sync));

  always_ff @(posedge dst_clk or negedge dst_rst_n) begin
    if (!dst_rst_n) tog_last <= 1'b0;
    else            tog_last <= tog_sync;
  end

  assign dst_pulse = tog_sync ^ tog_last;
endmodule
