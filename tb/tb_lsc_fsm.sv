// tb_lsc_fsm: walks the LSC power-up/reset state machine through every
// transition: power-up, POWER->RESET->UP, an LDC-initiated reset answered
// without LDOWN#, a local reset (LDOWN# low for at least four cycles), loss of
// rlup into the latched DOWN state, and DOWN->POWER on a reset.  Also checks
// the one-command-in-eight-cycles cadence and the command codes.
module tb_lsc_fsm;
  import odin_pkg::*;
  logic clk = 0, rst_n = 0;
  logic hp_up = 0, rlup = 0, ldc_reset = 0, lsc_reset = 0;
  lsc_state_e state;
  logic link_up, ldown, cmd_valid;
  odin_cmd_e cmd;
  int checks = 0, failures = 0;

  lsc_fsm #(.RESET_CYCLES(4)) dut (.clk, .rst_n, .hp_up, .rlup, .ldc_reset, .lsc_reset,
    .state, .link_up, .ldown, .cmd_valid, .cmd);

  always #5 clk = ~clk;

  task automatic check(input logic cond, input string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL @%0t: %s", $time, what); end
  endtask

  task automatic cyc(input int n = 1);
    repeat (n) @(posedge clk);
    #1;
  endtask

  // count commands of a kind over n cycles
  task automatic count_cmds(input int n, input odin_cmd_e c, output int k);
    k = 0;
    repeat (n) begin
      if (cmd_valid) begin
        if (cmd == c) k++;
        else k += 100;
      end
      cyc();
    end
  endtask

  int k, rc, dn;
  initial begin
    cyc(2); rst_n = 1; #1;
    check(state == LSC_POWER && ldown && !link_up, "power-up in POWER, link down");
    count_cmds(64, CMD_RRES, k);
    check(k == 8, $sformatf("POWER: 8 RRES in 64 cycles (%0d)", k));
    hp_up = 1; cyc(10);
    check(state == LSC_POWER, "POWER waits for rlup");
    rlup = 1; cyc();
    check(state == LSC_RESET, "POWER->RESET on hp_up&rlup");
    check(cmd_valid && cmd == CMD_RRES, "RESET sends RRES on entry");
    check(ldown, "LDOWN during power-up RESET");
    rc = 0; while (state == LSC_RESET && rc < 20) begin cyc(); rc++; end
    check(rc == 4, $sformatf("RESET lasts 4 cycles (%0d)", rc));
    check(state == LSC_UP && !ldown && link_up, "RESET->UP, link up");
    count_cmds(16, CMD_RRES, k);
    check(k == 0, "no commands while UP");
    // LDC-initiated reset
    ldc_reset = 1; cyc();
    check(state == LSC_RESET && !ldown, "UP->RESET on LDC reset, LDOWN stays high");
    ldc_reset = 0;
    cyc(4);
    check(state == LSC_UP, "back to UP after answering");
    // local reset
    lsc_reset = 1; cyc();
    check(state == LSC_POWER && ldown, "UP->POWER on local reset");
    cyc(20);
    check(state == LSC_POWER, "held in POWER while URESET# low");
    lsc_reset = 0;
    dn = 21;
    while (ldown && dn < 100) begin cyc(); dn++; end
    check(dn >= 25 && state == LSC_UP, $sformatf("up again, LDOWN low %0d cycles", dn));
    // remote link down
    rlup = 0; cyc();
    check(state == LSC_DOWN && ldown, "UP->DOWN on rlup#");
    count_cmds(32, CMD_RLDWN, k);
    check(k == 4, $sformatf("DOWN sends RLDWN 1 in 8 (%0d)", k));
    rlup = 1; cyc(20);
    check(state == LSC_DOWN, "DOWN is latched");
    ldc_reset = 1; cyc();
    check(state == LSC_POWER, "DOWN->POWER on LDC reset");
    ldc_reset = 0; cyc();
    check(state == LSC_RESET, "and on to RESET");
    cyc(4);
    // hp_up lost
    hp_up = 0; cyc();
    check(state == LSC_DOWN, "UP->DOWN on hp_up#");
    hp_up = 1; lsc_reset = 1; cyc();
    check(state == LSC_POWER, "DOWN->POWER on LSC reset");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
