// glink_rx_decoder: LDC receive decoder for one forward G-Link channel.
//
// Runs on the recovered forward clock and looks at one G-Link parallel word
// per cycle:
//   * data frame, not after a CRCC command: the first one is held as
//     D[31:16]; the next one completes the S-LINK word {held, D[15:0]}, which
//     leaves on out_valid/out_word one cycle later.  The flag bit tells data
//     (flag high) from control words (flag low); for a control word the even
//     parity of D[31:4] is checked against D[3:0] and reported in out_par_err.
//   * control frame: an internal command, accepted only if bits [9:0] are
//     exactly one of the five codes.  CRCC announces a checksum; RRES presets
//     the CRC and drops any half word; every command is reported as a pulse.
//   * data frame after CRCC: the checksum.  It is folded into the channel CRC
//     like data; the result must be zero, otherwise crc_err pulses.  The CRC is
//     then preset for the next block.
// Every flagged data half is folded into the channel CRC (crc_ccitt16).  A
// G-Link error, a half word followed by anything but its second half, or two
// halves with different flags also pulse crc_err (the word is dropped), so
// these show up in the block's error report like a checksum mismatch.
// Word format, commands and CRC follow ODIN; the framing-error rules are this
// implementation's own.
module glink_rx_decoder
  import odin_pkg::*;
(
  input  logic        clk,
  input  logic        rst_n,
  input  glink_word_t rx,
  input  logic        rx_error,
  output logic        out_valid,
  output slink_word_t out_word,
  output logic        out_par_err,
  output logic        cmd_valid,     // pulse: a valid command was received
  output odin_cmd_e   cmd,
  output logic        crc_checked,   // pulse: a checksum was checked
  output logic        crc_err        // pulse: checksum or framing error
);
  logic        have_hi, hi_flag, expect_crc;
  logic [15:0] hi;
  logic        crc_clear, crc_en;
  logic [15:0] crc, crc_nxt;
  logic        is_cmd_code;

  always_comb begin
    unique case (rx.d[9:0])
      CMD_CRCC, CMD_TON, CMD_TOFF, CMD_RLDWN, CMD_RRES: is_cmd_code = 1'b1;
      default:                                         is_cmd_code = 1'b0;
    endcase
  end

  assign crc_clear = (!rx_error && rx.cav && is_cmd_code && rx.d[9:0] == CMD_RRES)
                  || (!rx_error && rx.dav && !rx.cav && expect_crc);
  assign crc_en    = !rx_error && rx.dav && !rx.cav && rx.flag && !expect_crc;

  crc_ccitt16 u_crc (
    .clk(clk), .rst_n(rst_n), .clear(crc_clear), .en(crc_en),
    .data(rx.d), .crc(crc), .crc_next(crc_nxt)
  );

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      have_hi     <= 1'b0;
      hi_flag     <= 1'b0;
      hi          <= '0;
      expect_crc  <= 1'b0;
      out_valid   <= 1'b0;
      out_word    <= '0;
      out_par_err <= 1'b0;
      cmd_valid   <= 1'b0;
      cmd         <= CMD_RRES;
      crc_checked <= 1'b0;
      crc_err     <= 1'b0;
    end else begin
      out_valid   <= 1'b0;
      cmd_valid   <= 1'b0;
      crc_checked <= 1'b0;
      crc_err     <= 1'b0;
      if (rx_error || (rx.dav && rx.cav)) begin
        have_hi    <= 1'b0;
        expect_crc <= 1'b0;
        crc_err    <= 1'b1;
      end else if (rx.cav) begin
        if (have_hi) crc_err <= 1'b1;
        have_hi <= 1'b0;
        if (is_cmd_code) begin
          cmd_valid  <= 1'b1;
          cmd        <= odin_cmd_e'(rx.d[9:0]);
          expect_crc <= (rx.d[9:0] == CMD_CRCC);
        end
      end else if (rx.dav) begin
        if (expect_crc) begin
          expect_crc  <= 1'b0;
          crc_checked <= 1'b1;
          if (crc_nxt != 16'h0000 || !rx.flag || have_hi) crc_err <= 1'b1;
          have_hi <= 1'b0;
        end else if (!have_hi) begin
          have_hi <= 1'b1;
          hi      <= rx.d;
          hi_flag <= rx.flag;
        end else begin
          have_hi <= 1'b0;
          if (hi_flag != rx.flag) begin
            crc_err <= 1'b1;
          end else begin
            out_valid     <= 1'b1;
            out_word.ctrl <= !rx.flag;
            out_word.d    <= {hi, rx.d};
            out_par_err   <= !rx.flag && (cw_parity({hi, rx.d}) != rx.d[3:0]);
          end
        end
      end else if (have_hi) begin
        // idle between the two halves of a word is not allowed
        have_hi <= 1'b0;
        crc_err <= 1'b1;
      end
    end
  end
endmodule
