// glink_model: behavioural stand-in for one HP G-Link serializer/deserializer
// pair (HDMP-1032 transmitter, fibre, HDMP-1034 receiver), seen from its
// parallel sides only.  It is not synthesizable logic and models no serial
// coding: a parallel word given to the transmitter appears at the receiver
// LATENCY cycles later, on the recovered clock, which in this model is the
// transmitter's clock itself.  tx_locked rises LOCK_CYCLES after power-up;
// rx_ready rises LOCK_CYCLES after the fibre is connected and drops at once
// when it is pulled.  While disconnected the receiver outputs idles.
// 'flip' corrupts bit 0 of the next flagged data frame (a data half or a
// CRC checksum): a bit error the G-Link coding did not catch, which only the
// link CRC can find.  rx_error is held low.
module glink_model
  import odin_pkg::*;
#(
  parameter int LATENCY     = 3,
  parameter int LOCK_CYCLES = 20
) (
  input  logic        clk,
  input  logic        power_n,
  input  logic        connected,
  input  glink_word_t tx,
  input  logic        flip,
  output glink_word_t rx,
  output logic        rx_ready,
  output logic        rx_error,
  output logic        tx_locked
);
  glink_word_t pipe [LATENCY];
  int lock_cnt, rdy_cnt;
  logic flip_pend;

  always_ff @(posedge clk or negedge power_n) begin
    if (!power_n) begin
      for (int i = 0; i < LATENCY; i++) pipe[i] <= GLINK_IDLE;
      lock_cnt  <= 0;
      rdy_cnt   <= 0;
      tx_locked <= 1'b0;
      rx_ready  <= 1'b0;
      flip_pend <= 1'b0;
    end else begin
      glink_word_t w;
      w = connected ? tx : GLINK_IDLE;
      if (flip) flip_pend <= 1'b1;
      if ((flip || flip_pend) && w.dav && w.flag) begin
        w.d[0] = ~w.d[0];
        flip_pend <= 1'b0;
      end
      pipe[0] <= w;
      for (int i = 1; i < LATENCY; i++) pipe[i] <= pipe[i-1];
      if (lock_cnt < LOCK_CYCLES) lock_cnt <= lock_cnt + 1;
      tx_locked <= (lock_cnt >= LOCK_CYCLES);
      if (!connected) rdy_cnt <= 0;
      else if (rdy_cnt < LOCK_CYCLES) rdy_cnt <= rdy_cnt + 1;
      rx_ready <= connected && (rdy_cnt >= LOCK_CYCLES);
    end
  end

  assign rx       = pipe[LATENCY-1];
  assign rx_error = 1'b0;
endmodule
