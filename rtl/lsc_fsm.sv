// lsc_fsm: power-up and reset state machine of the ODIN Link Source Card.
//
// States and transitions:
//   POWER  (after power-up, or after a local reset while up)
//          -> RESET when hp_up and rlup are both high and no local reset is held
//   RESET  -> UP after RESET_CYCLES cycles
//   UP     -> RESET on a reset request from the LDC (answered without going down)
//          -> POWER on a local reset (URESET# low)
//          -> DOWN  when hp_up or rlup is lost
//   DOWN   -> POWER on a reset from either side (link down is latched until then)
// Outputs:
//   * cmd_valid/cmd: the command word the forward channels broadcast.  In POWER
//     a remote reset (RRES) and in DOWN an LSC-down (RLDWN) command is sent once
//     every eight cycles, so the LDC's G-Link receivers see one command and seven
//     idles.  On entry to RESET one RRES is sent: it resets the LDC's CRC, error
//     latches and word rotation.
//   * ldown: S-LINK LDOWN# (active high here) towards the front-end board.  Low
//     only in UP, and in a RESET entered from UP to answer the LDC, so the
//     LSC stays up during an LDC-initiated reset; a local reset keeps it high
//     for at least RESET_CYCLES cycles.
//   * link_up: data may flow.
// All inputs must already be in this (XCLK) domain.  States, transitions, the
// one-in-eight command rate and the four-cycle link-down time follow ODIN; the
// counter runs on XCLK rather than on the user clock.
module lsc_fsm
  import odin_pkg::*;
#(
  parameter int RESET_CYCLES = 4
) (
  input  logic      clk,
  input  logic      rst_n,
  input  logic      hp_up,
  input  logic      rlup,
  input  logic      ldc_reset,   // remote reset request seen on the return channel
  input  logic      lsc_reset,   // local URESET# (active high, synchronised)
  output lsc_state_e state,
  output logic      link_up,
  output logic      ldown,
  output logic      cmd_valid,
  output odin_cmd_e cmd
);
  localparam int RW = $clog2(RESET_CYCLES + 1);

  lsc_state_e nxt;
  logic [2:0]  slot;
  logic [RW-1:0] rcnt;
  logic        answering;   // RESET entered from UP to answer the LDC

  always_comb begin
    nxt = state;
    unique case (state)
      LSC_POWER: if (hp_up && rlup && !lsc_reset) nxt = LSC_RESET;
      LSC_RESET: if (lsc_reset)                   nxt = LSC_POWER;
                 else if (rcnt == RW'(RESET_CYCLES-1)) nxt = LSC_UP;
      LSC_UP:    if (lsc_reset)                   nxt = LSC_POWER;
                 else if (!hp_up || !rlup)        nxt = LSC_DOWN;
                 else if (ldc_reset)              nxt = LSC_RESET;
      LSC_DOWN:  if (lsc_reset || ldc_reset)      nxt = LSC_POWER;
      default:                                    nxt = LSC_POWER;
    endcase
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state     <= LSC_POWER;
      slot      <= '0;
      rcnt      <= '0;
      answering <= 1'b0;
    end else begin
      state <= nxt;
      slot  <= slot + 1'b1;
      rcnt  <= (state == LSC_RESET && nxt == LSC_RESET) ? rcnt + 1'b1 : '0;
      if (nxt == LSC_RESET && state != LSC_RESET) answering <= (state == LSC_UP);
    end
  end

  always_comb begin
    cmd_valid = 1'b0;
    cmd       = CMD_RRES;
    unique case (state)
      LSC_POWER: cmd_valid = (slot == 3'd0);
      LSC_RESET: cmd_valid = (rcnt == '0);
      LSC_DOWN:  begin cmd_valid = (slot == 3'd0); cmd = CMD_RLDWN; end
      default:   cmd_valid = 1'b0;
    endcase
  end

  assign link_up = (state == LSC_UP);
  assign ldown   = !(state == LSC_UP || (state == LSC_RESET && answering));
endmodule
