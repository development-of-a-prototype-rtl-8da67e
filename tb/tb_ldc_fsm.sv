// tb_ldc_fsm: walks the LDC power-up/reset state machine through every
// transition of its state diagram and checks the three outputs (link down and
// reset request to the LSC, LDOWN# to the read-out board) in each state.
module tb_ldc_fsm;
  import odin_pkg::*;
  logic clk = 0, rst_n = 0;
  logic hp_up = 0, rlup = 0, lsc_reset = 0, ldc_reset = 0;
  ldc_state_e state;
  logic ret_down, ret_reset, ldown;
  int checks = 0, failures = 0;

  ldc_fsm dut (.clk, .rst_n, .hp_up, .rlup, .lsc_reset, .ldc_reset, .state, .ret_down,
    .ret_reset, .ldown);

  always #5 clk = ~clk;

  task automatic check(input logic cond, input string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL @%0t: %s", $time, what); end
  endtask
  task automatic cyc(input int n = 1);
    repeat (n) @(posedge clk);
    #1;
  endtask
  task automatic outs(input logic d, input logic r, input logic l, input string where);
    check(ret_down == d && ret_reset == r && ldown == l,
          $sformatf("%s outputs down=%0b reset=%0b ldown=%0b", where, ret_down, ret_reset, ldown));
  endtask

  initial begin
    cyc(2); rst_n = 1; #1;
    check(state == LDC_POWER_DOWN, "power-up state");
    outs(1, 0, 1, "POWER/DOWN");
    hp_up = 1; cyc(5);
    check(state == LDC_POWER_DOWN, "waits for rlup");
    rlup = 1; cyc();
    check(state == LDC_UP, "POWER/DOWN->UP");
    outs(0, 0, 0, "UP");
    lsc_reset = 1; cyc(); lsc_reset = 0;
    check(state == LDC_UP, "LSC reset keeps UP");
    ldc_reset = 1; cyc();
    check(state == LDC_RES24, "UP->RES2-4 on LDC reset");
    outs(0, 1, 1, "RES2-4");
    ldc_reset = 0; cyc(3);
    check(state == LDC_RES24, "RES2-4 waits for LSC reset");
    lsc_reset = 1; cyc(); lsc_reset = 0;
    check(state == LDC_UP, "RES2-4->UP on LSC reset");
    rlup = 0; cyc();
    check(state == LDC_POWER_DOWN, "UP->POWER/DOWN on rlup#");
    ldc_reset = 1; cyc();
    check(state == LDC_RES1, "POWER/DOWN->RES1 on LDC reset");
    outs(1, 0, 1, "RES1");
    hp_up = 0; ldc_reset = 0; cyc(3);
    check(state == LDC_RES1, "RES1 waits for hp_up");
    hp_up = 1; cyc();
    check(state == LDC_RES24, "RES1->RES2-4 on hp_up");
    hp_up = 0; cyc();
    check(state == LDC_RES1, "RES2-4->RES1 when hp_up lost");
    hp_up = 1; cyc(); lsc_reset = 1; cyc(); lsc_reset = 0;
    check(state == LDC_UP, "reset cycle completes without rlup check");
    rlup = 1; hp_up = 0; cyc();
    check(state == LDC_POWER_DOWN, "UP->POWER/DOWN on hp_up#");
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
