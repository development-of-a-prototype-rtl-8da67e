// ldc_fsm: power-up and reset state machine of the ODIN Link Destination Card.
//
// States and transitions:
//   POWER/DOWN -> UP    when hp_up and rlup are both high
//              -> RES1  on a local reset (URESET# low)
//   RES1       -> RES2-4 when hp_up is high
//   RES2-4     -> RES1  when hp_up is lost
//              -> UP    when the LSC's reset command arrives (lsc_reset pulse)
//   UP         -> RES2-4 on a local reset
//              -> POWER/DOWN when hp_up or rlup is lost
//              an LSC reset leaves UP in UP; the receive logic clears its error
//              latches and test mode on that command by itself.
// Outputs, sent to the LSC on the return channel and to the read-out board:
//   ret_down  "link down" to the LSC: POWER/DOWN and RES1
//   ret_reset "reset command" to the LSC: RES2-4
//   ldown     LDOWN# (active high here) towards the read-out board: all but UP
// In POWER/DOWN the LDC keeps telling the LSC that it is down, so the LDC is
// always up before the LSC and no word written to the LSC is lost.
// All inputs must already be in this (LDC XCLK) domain.  States and
// transitions follow ODIN; the conditions for leaving UP and RES2-4 backwards
// are this implementation's reading of the two double-headed arrows.
module ldc_fsm
  import odin_pkg::*;
(
  input  logic       clk,
  input  logic       rst_n,
  input  logic       hp_up,
  input  logic       rlup,
  input  logic       lsc_reset,   // pulse: RRES command received from the LSC
  input  logic       ldc_reset,   // local URESET# (active high, synchronised)
  output ldc_state_e state,
  output logic       ret_down,
  output logic       ret_reset,
  output logic       ldown
);
  ldc_state_e nxt;

  always_comb begin
    nxt = state;
    unique case (state)
      LDC_POWER_DOWN: if (ldc_reset)            nxt = LDC_RES1;
                      else if (hp_up && rlup)   nxt = LDC_UP;
      LDC_RES1:       if (hp_up && !ldc_reset)  nxt = LDC_RES24;
      LDC_RES24:      if (!hp_up)               nxt = LDC_RES1;
                      else if (lsc_reset && !ldc_reset) nxt = LDC_UP;
      LDC_UP:         if (ldc_reset)            nxt = LDC_RES24;
                      else if (!hp_up || !rlup) nxt = LDC_POWER_DOWN;
      default:                                  nxt = LDC_POWER_DOWN;
    endcase
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) state <= LDC_POWER_DOWN;
    else        state <= nxt;
  end

  assign ret_down  = (state == LDC_POWER_DOWN) || (state == LDC_RES1);
  assign ret_reset = (state == LDC_RES24);
  assign ldown     = (state != LDC_UP);
endmodule
