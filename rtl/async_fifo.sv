// async_fifo: LSC input FIFO.  The user writes S-LINK words on UCLK; the
// protocol logic reads them on the transmit clock XCLK.  ODIN uses an 8-deep,
// 33-bit FIFO (32 data bits plus the control flag).
//
// Classic dual-clock design: binary pointers one bit wider than the address,
// converted to Gray code and synchronised with two flops into the other
// domain.  'full' and 'almost_full' are computed in the write domain, 'empty' in
// the read domain; both are pessimistic while a pointer is in flight.
// almost_full is high when fewer than AF_MARGIN+1 entries are free: it drives
// the S-LINK LFF# flag, and ODIN lets the user write AF_MARGIN (2) more words
// after LFF# goes low.  The read side is show-ahead: rdata is the oldest word
// whenever empty is low, and 'rd' removes it.
// Depth, width and the two-word margin follow ODIN; the pointer scheme is this
// implementation's choice (the specification gives the size only).
module async_fifo #(
  parameter int WIDTH     = 33,
  parameter int DEPTH     = 8,     // power of two
  parameter int AF_MARGIN = 2
) (
  input  logic             wclk,
  input  logic             wrst_n,
  input  logic             wr,
  input  logic [WIDTH-1:0] wdata,
  output logic             full,
  output logic             almost_full,

  input  logic             rclk,
  input  logic             rrst_n,
  input  logic             rd,
  output logic [WIDTH-1:0] rdata,
  output logic             empty
);
  localparam int AW = $clog2(DEPTH);

  logic [WIDTH-1:0] mem [DEPTH];
  logic [AW:0] wbin, rbin, wgray, rgray, wgray_s, rgray_s;

  function automatic logic [AW:0] bin2gray(input logic [AW:0] b);
    return b ^ (b >> 1);
  endfunction
  function automatic logic [AW:0] gray2bin(input logic [AW:0] g);
    logic [AW:0] b;
    b[AW] = g[AW];
    for (int i = AW-1; i >= 0; i--) b[i] = b[i+1] ^ g[i];
    return b;
  endfunction

  // ---------------- write domain ----------------
  logic [AW:0] rbin_w, used_w;
  sync_2ff #(.WIDTH(AW+1)) u_rsync (.clk(wclk), .rst_n(wrst_n), .d(rgray), .q(rgray_s));
  assign rbin_w      = gray2bin(rgray_s);
  assign used_w      = wbin - rbin_w;
  assign full        = (used_w == (AW+1)'(DEPTH));
  assign almost_full = (used_w >= (AW+1)'(DEPTH - AF_MARGIN));

  always_ff @(posedge wclk) begin
    if (wr && !full) mem[wbin[AW-1:0]] <= wdata;
  end

  always_ff @(posedge wclk or negedge wrst_n) begin
    if (!wrst_n) begin
      wbin  <= '0;
      wgray <= '0;
    end else if (wr && !full) begin
      wbin  <= wbin + 1'b1;
      wgray <= bin2gray(wbin + 1'b1);
    end
  end

  // ---------------- read domain ----------------
  sync_2ff #(.WIDTH(AW+1)) u_wsync (.clk(rclk), .rst_n(rrst_n), .d(wgray), .q(wgray_s));
  assign empty = (wgray_s == rgray);
  assign rdata = mem[rbin[AW-1:0]];

  always_ff @(posedge rclk or negedge rrst_n) begin
    if (!rrst_n) begin
      rbin  <= '0;
      rgray <= '0;
    end else if (rd && !empty) begin
      rbin  <= rbin + 1'b1;
      rgray <= bin2gray(rbin + 1'b1);
    end
  end

  // A write into a full FIFO or a read from an empty one is a protocol error.
  a_no_overflow:  assert property (@(posedge wclk) disable iff (!wrst_n) wr |-> !full);
  a_no_underflow: assert property (@(posedge rclk) disable iff (!rrst_n) rd |-> !empty);
endmodule
