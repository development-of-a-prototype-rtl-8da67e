// sync_2ff: two-flop synchroniser for slowly changing level signals that cross
// from another clock domain (link status bits, return lines, reset requests).
// Each bit is synchronised on its own, so a multi-bit value may be seen one
// bit at a time; only use it for independent bits.  Latency: two clock edges.
module sync_2ff #(
  parameter int          WIDTH = 1,
  parameter logic [WIDTH-1:0] RESET_VAL = '0
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic [WIDTH-1:0] d,
  output logic [WIDTH-1:0] q
);
  logic [WIDTH-1:0] meta;
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      meta <= RESET_VAL;
      q    <= RESET_VAL;
    end else begin
      meta <= d;
      q    <= meta;
    end
  end
endmodule
