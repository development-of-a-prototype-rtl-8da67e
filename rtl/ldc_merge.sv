// ldc_merge: the LDC stage that puts the forward channels back together
// ("dbmux"), checks the test pattern and reports errors.
//
// Each channel decoder delivers whole S-LINK words into a small queue of its
// own.  The LSC hands words to the channels in strict rotation A, B, A, ...,
// so this block reads the queues in the same rotation: it waits for the
// channel whose turn it is and passes at most one word per cycle, which is the
// LDC's full output rate.  A word from B that arrives in the same cycle as one
// from A, or a cycle early, simply waits in its queue.  The rotation restarts
// at A, and the queues empty, on the remote-reset command.
//
// Error reporting (block basis): a CRC or framing error on a channel sets that
// channel's latch.  The next control word leaves with LDERR (lderr) set if any
// latch or its own parity check is bad, with LD[3]/LD[2] showing the CRC error
// of channel A/B, LD[1] its parity error and LD[0] zero; the latches clear then.
// Commands, taken from channel A (all channels carry them in the same cycle):
//   RRES  clears latches, test mode and queues; pulses lsc_reset
//   TON   test mode on: data words must follow the walking-one pattern
//         1<<k, k = 0,1,..,31,0,..; a mismatch sets test_err and lderr
//   TOFF  test mode off
//   RLDWN rlup low; any other valid command sets rlup high
// Output is registered: out_valid/out_word/lderr one cycle after the pop.
// Rotation and the error report contents follow ODIN; queue depth and the bit
// order of LD[3:0] are this implementation's choice.
module ldc_merge
  import odin_pkg::*;
#(
  parameter int CHANNELS = 2,
  parameter int QDEPTH   = 4
) (
  input  logic                       clk,
  input  logic                       rst_n,
  input  logic        [CHANNELS-1:0] in_valid,
  input  slink_word_t [CHANNELS-1:0] in_word,
  input  logic        [CHANNELS-1:0] in_par_err,
  input  logic        [CHANNELS-1:0] in_crc_err,
  input  logic                       cmd_valid,
  input  odin_cmd_e                  cmd,
  output logic                       out_valid,
  output slink_word_t                out_word,
  output logic                       lderr,
  output logic                       test_mode,
  output logic                       test_err,
  output logic                       rlup,
  output logic                       lsc_reset,
  output logic                       overflow
);
  localparam int PW = (CHANNELS > 1) ? $clog2(CHANNELS) : 1;
  localparam int QW = $clog2(QDEPTH);

  typedef struct packed {
    slink_word_t w;
    logic        par_err;
  } qent_t;

  qent_t       q     [CHANNELS][QDEPTH];
  logic [QW:0] wp    [CHANNELS];
  logic [QW:0] rp    [CHANNELS];
  logic [PW-1:0] ptr;
  logic [CHANNELS-1:0] crc_lat;
  logic [4:0]  walk;
  logic        rres;

  logic  pop;
  qent_t head;

  assign rres = cmd_valid && (cmd == CMD_RRES);
  assign pop  = (wp[ptr] != rp[ptr]);
  assign head = q[ptr][rp[ptr][QW-1:0]];

  always_ff @(posedge clk) begin
    for (int c = 0; c < CHANNELS; c++)
      if (in_valid[c]) q[c][wp[c][QW-1:0]] <= '{w: in_word[c], par_err: in_par_err[c]};
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int c = 0; c < CHANNELS; c++) begin
        wp[c] <= '0;
        rp[c] <= '0;
      end
      ptr       <= '0;
      crc_lat   <= '0;
      walk      <= '0;
      test_mode <= 1'b0;
      test_err  <= 1'b0;
      rlup      <= 1'b0;
      lsc_reset <= 1'b0;
      overflow  <= 1'b0;
      out_valid <= 1'b0;
      out_word  <= '0;
      lderr     <= 1'b0;
    end else begin
      out_valid <= 1'b0;
      lderr     <= 1'b0;
      lsc_reset <= rres;
      overflow  <= 1'b0;
      crc_lat   <= crc_lat | in_crc_err;

      for (int c = 0; c < CHANNELS; c++) begin
        if (in_valid[c]) begin
          if ((wp[c] - rp[c]) == (QW+1)'(QDEPTH)) overflow <= 1'b1;
          else                                    wp[c] <= wp[c] + 1'b1;
        end
      end

      if (cmd_valid) rlup <= (cmd != CMD_RLDWN);
      if (cmd_valid && cmd == CMD_TON) begin
        test_mode <= 1'b1;
        test_err  <= 1'b0;
        walk      <= '0;
      end
      if (cmd_valid && cmd == CMD_TOFF) test_mode <= 1'b0;

      if (rres) begin
        for (int c = 0; c < CHANNELS; c++) begin
          wp[c] <= '0;
          rp[c] <= '0;
        end
        ptr       <= '0;
        crc_lat   <= '0;
        test_mode <= 1'b0;
        test_err  <= 1'b0;
      end else if (pop) begin
        rp[ptr]   <= rp[ptr] + 1'b1;
        ptr       <= (ptr == PW'(CHANNELS-1)) ? '0 : ptr + 1'b1;
        out_valid <= 1'b1;
        out_word  <= head.w;
        if (head.w.ctrl) begin
          out_word.d[3] <= crc_lat[0] | in_crc_err[0];
          out_word.d[2] <= (CHANNELS > 1) ? (crc_lat[CHANNELS-1] | in_crc_err[CHANNELS-1]) : 1'b0;
          out_word.d[1] <= head.par_err;
          out_word.d[0] <= 1'b0;
          lderr         <= (|crc_lat) | (|in_crc_err) | head.par_err;
          crc_lat       <= '0;
        end else if (test_mode) begin
          walk <= walk + 1'b1;
          if (head.w.d != (32'd1 << walk)) begin
            test_err <= 1'b1;
            lderr    <= 1'b1;
          end
        end
      end
    end
  end
endmodule
