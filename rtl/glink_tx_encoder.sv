// glink_tx_encoder: LSC transmit encoder for one forward G-Link channel.
//
// It accepts one request at a time and turns it into G-Link parallel words,
// one per XCLK cycle, on a registered output:
//   REQ_DATA  S-LINK data word:    D[31:16] then D[15:0], flag high, TX_DATA high
//   REQ_CTRL  S-LINK control word: D[31:16] then D[15:0], flag low,  TX_DATA high
//             (the router has already put the parity bits in D[3:0])
//   REQ_CRC   CRCC command frame (TX_CNTL high), then the checksum word with the
//             flag high; the CRC register is then preset again
//   REQ_CMD   one internal command frame (TX_CNTL high, code in bits [9:0])
// With no request the output is an idle cycle (TX_DATA and TX_CNTL low), in
// which the G-Link chip sends its own fill frame.  The two halves of a word are
// always back to back.
//
// The channel CRC (crc_ccitt16) folds in every word sent with the flag high,
// i.e. data halves; the checksum sent is bit-reverse of the register so that
// the receiver's register ends at zero.  The CRC is preset after a checksum
// and whenever a remote-reset (RRES) command is sent, as the LDC does on
// receiving them.
//
// Handshake: a request is taken in a cycle where req_valid and req_ready are
// both high.  req_ready is low only while the second word of a two-word request
// is being produced, so one channel carries one S-LINK word every two cycles.
// The first word of a request appears on 'tx' one cycle after it is taken.
// Word formats and command codes follow ODIN; request encoding is this
// implementation's own.
module glink_tx_encoder
  import odin_pkg::*;
(
  input  logic        clk,
  input  logic        rst_n,
  input  logic        req_valid,
  input  tx_req_e     req_kind,
  input  logic [31:0] req_data,
  output logic        req_ready,
  output glink_word_t tx,
  output logic        data_sent   // pulse: an S-LINK data word was taken
);
  logic        second;     // second word of a two-word request is due
  tx_req_e     kind_q;
  logic [15:0] low_q;
  logic        crc_clear, crc_en;
  logic [15:0] crc, crc_in, crc_nxt;
  logic        take;

  assign req_ready = !second;
  assign take      = req_valid && req_ready;
  assign data_sent = take && (req_kind == REQ_DATA);

  crc_ccitt16 u_crc (
    .clk(clk), .rst_n(rst_n), .clear(crc_clear), .en(crc_en),
    .data(crc_in), .crc(crc), .crc_next(crc_nxt)
  );

  // CRC input: the word being put on the line this cycle, if it is flagged data.
  always_comb begin
    crc_clear = 1'b0;
    crc_en    = 1'b0;
    crc_in    = 16'h0000;
    if (second) begin
      if (kind_q == REQ_DATA) begin
        crc_en = 1'b1;
        crc_in = low_q;
      end else if (kind_q == REQ_CRC) begin
        crc_clear = 1'b1;               // checksum goes out now
      end
    end else if (take) begin
      if (req_kind == REQ_DATA) begin
        crc_en = 1'b1;
        crc_in = req_data[31:16];
      end else if (req_kind == REQ_CMD && req_data[9:0] == CMD_RRES) begin
        crc_clear = 1'b1;
      end
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      second <= 1'b0;
      kind_q <= REQ_DATA;
      low_q  <= '0;
      tx     <= GLINK_IDLE;
    end else if (second) begin
      second <= 1'b0;
      if (kind_q == REQ_CRC)
        tx <= '{dav: 1'b1, cav: 1'b0, flag: 1'b1, d: bitrev16(crc)};
      else
        tx <= '{dav: 1'b1, cav: 1'b0, flag: (kind_q == REQ_DATA), d: low_q};
    end else if (take) begin
      kind_q <= req_kind;
      low_q  <= req_data[15:0];
      unique case (req_kind)
        REQ_DATA, REQ_CTRL: begin
          second <= 1'b1;
          tx <= '{dav: 1'b1, cav: 1'b0, flag: (req_kind == REQ_DATA), d: req_data[31:16]};
        end
        REQ_CRC: begin
          second <= 1'b1;
          tx <= '{dav: 1'b0, cav: 1'b1, flag: 1'b0, d: {6'b0, CMD_CRCC}};
        end
        REQ_CMD: begin
          tx <= '{dav: 1'b0, cav: 1'b1, flag: 1'b0, d: {6'b0, req_data[9:0]}};
        end
        default: tx <= GLINK_IDLE;
      endcase
    end else begin
      tx <= GLINK_IDLE;
    end
  end

  a_halves_back_to_back: assert property (@(posedge clk) disable iff (!rst_n)
    second |=> !second);
endmodule
