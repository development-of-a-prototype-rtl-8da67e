// lsc_router: the "parity/routing" stage of the ODIN Link Source Card.
//
// It sits between the input FIFO and the CHANNELS forward-channel encoders
// (glink_tx_encoder) and decides, every XCLK cycle, what each channel sends:
//   * While the link is not up it broadcasts the command words the LSC state
//     machine asks for (remote reset, LSC down) to every channel.
//   * While up, it takes S-LINK words from the FIFO and hands them to the
//     channels in strict rotation A, B, A, B ... (only A with CHANNELS = 1).
//     The LDC reads the channels back in the same rotation, which restores the
//     order.  Control words get their four even-parity bits in D[3:0].
//   * Before a control word that follows data, and after CRC_WORDS data words
//     per channel on average (CRC_WORDS*CHANNELS in all), it asks every
//     channel at once for a CRC command plus checksum.  No checksum is sent just
//     because the FIFO ran empty.
//   * XOFF from the return channel stops it from starting new words.
//   * Test mode: while test_req is high and the link is up it broadcasts TON,
//     then sends the walking-one pattern 1<<k (k = 0..31, repeating) as data
//     words in place of FIFO data; when test_req drops it sends a checksum and
//     TOFF.
// Broadcasts wait until every channel is ready so that all channels send them
// in the same cycle.  Rotation pointer and counters restart whenever the link
// is not up, as the LDC restarts on the remote-reset command.
// Rotation, CRC rules, parity and the test pattern follow ODIN; the broadcast
// handshake and the test-mode entry and exit sequence are this implementation's own.
module lsc_router
  import odin_pkg::*;
#(
  parameter int CHANNELS  = 2,
  parameter int CRC_WORDS = 1024
) (
  input  logic                        clk,
  input  logic                        rst_n,
  input  logic                        link_up,
  input  logic                        cmd_valid,   // from lsc_fsm, only while not up
  input  odin_cmd_e                   cmd,
  input  logic                        xoff,
  input  logic                        test_req,
  // input FIFO, show-ahead read side
  input  slink_word_t                 fifo_rdata,
  input  logic                        fifo_empty,
  output logic                        fifo_rd,
  // channel encoders
  output logic    [CHANNELS-1:0]      req_valid,
  output tx_req_e [CHANNELS-1:0]      req_kind,
  output logic    [CHANNELS-1:0][31:0] req_data,
  input  logic    [CHANNELS-1:0]      req_ready,
  output logic                        test_active,
  output logic                        crc_sent     // pulse: checksum requested on all channels
);
  localparam int PW = (CHANNELS > 1) ? $clog2(CHANNELS) : 1;
  localparam int CW = $clog2(CRC_WORDS*CHANNELS + 1);

  logic          bc_pend;
  tx_req_e       bc_kind;
  logic [31:0]   bc_data;
  logic [PW-1:0] ptr;
  logic          data_since_crc;
  logic [CW-1:0] words_since_crc;
  logic [4:0]    walk;

  logic all_ready, bc_go, flush_req, issue_word;
  logic [31:0] word_data;
  tx_req_e     word_kind;

  assign all_ready = &req_ready;
  assign bc_go     = bc_pend && all_ready;

  assign flush_req = data_since_crc && (
       (!test_active && !test_req && !fifo_empty && fifo_rdata.ctrl)
    || (words_since_crc >= CW'(CRC_WORDS*CHANNELS))
    || (test_req != test_active));

  // Word for the channel under the pointer.
  always_comb begin
    if (test_active) begin
      word_kind = REQ_DATA;
      word_data = 32'd1 << walk;
    end else if (fifo_rdata.ctrl) begin
      word_kind = REQ_CTRL;
      word_data = {fifo_rdata.d[31:4], cw_parity(fifo_rdata.d)};
    end else begin
      word_kind = REQ_DATA;
      word_data = fifo_rdata.d;
    end
  end

  assign issue_word = link_up && !bc_pend && !flush_req && (test_req == test_active)
                   && !xoff && req_ready[ptr] && (test_active || !fifo_empty);
  assign fifo_rd    = issue_word && !test_active;

  always_comb begin
    for (int c = 0; c < CHANNELS; c++) begin
      req_valid[c] = bc_go;
      req_kind[c]  = bc_kind;
      req_data[c]  = bc_data;
      if (!bc_pend && issue_word && PW'(c) == ptr) begin
        req_valid[c] = 1'b1;
        req_kind[c]  = word_kind;
        req_data[c]  = word_data;
      end
    end
  end

  assign crc_sent = bc_go && (bc_kind == REQ_CRC);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      bc_pend         <= 1'b0;
      bc_kind         <= REQ_CMD;
      bc_data         <= '0;
      ptr             <= '0;
      data_since_crc  <= 1'b0;
      words_since_crc <= '0;
      walk            <= '0;
      test_active     <= 1'b0;
    end else begin
      if (bc_go) bc_pend <= 1'b0;

      if (!link_up) begin
        ptr             <= '0;
        data_since_crc  <= 1'b0;
        words_since_crc <= '0;
        test_active     <= 1'b0;
        walk            <= '0;
        if (cmd_valid) begin
          bc_pend <= 1'b1;
          bc_kind <= REQ_CMD;
          bc_data <= {22'b0, cmd};
        end
      end else if (!bc_pend) begin
        if (flush_req) begin
          bc_pend         <= 1'b1;
          bc_kind         <= REQ_CRC;
          data_since_crc  <= 1'b0;
          words_since_crc <= '0;
        end else if (test_req && !test_active) begin
          bc_pend     <= 1'b1;
          bc_kind     <= REQ_CMD;
          bc_data     <= {22'b0, CMD_TON};
          test_active <= 1'b1;
          walk        <= '0;
        end else if (!test_req && test_active) begin
          bc_pend     <= 1'b1;
          bc_kind     <= REQ_CMD;
          bc_data     <= {22'b0, CMD_TOFF};
          test_active <= 1'b0;
        end else if (issue_word) begin
          ptr <= (ptr == PW'(CHANNELS-1)) ? '0 : ptr + 1'b1;
          if (word_kind == REQ_DATA) begin
            data_since_crc  <= 1'b1;
            words_since_crc <= words_since_crc + 1'b1;
            if (test_active) walk <= walk + 1'b1;
          end
        end
      end
    end
  end

  a_one_word_per_cycle: assert property (@(posedge clk) disable iff (!rst_n)
    !bc_pend |-> $onehot0(req_valid));
endmodule
