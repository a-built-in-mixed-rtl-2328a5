// Self-checking testbench of the TAP controller.
//
// Walks known TMS paths of the 1149.1 state diagram (reset by five ones,
// DR scan, IR scan, pause and resume) and then a random TMS sequence,
// comparing the state with a reference model kept in the testbench as a
// lookup of (state, TMS) pairs. Also checks the decoded strobes and TRST*.
module tb_tap_controller;
  import bimbo_pkg::*;

  logic tck = 0, trst_n = 1, tms = 1;
  tap_state_e state;
  dr_ctrl_t dr, ir;
  logic run_idle;
  int checks = 0, failures = 0;

  tap_controller dut (.*);

  always #5 tck = ~tck;

  initial begin
    #200000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Reference next-state: {tms=0, tms=1} successors, numbered as in 1149.1.
  function automatic tap_state_e ref_next(tap_state_e s, logic t);
    tap_state_e n0 [16] = '{RUN_TEST_IDLE, RUN_TEST_IDLE, CAPTURE_DR, SHIFT_DR,
                            SHIFT_DR, PAUSE_DR, PAUSE_DR, SHIFT_DR, RUN_TEST_IDLE,
                            CAPTURE_IR, SHIFT_IR, SHIFT_IR, PAUSE_IR, PAUSE_IR,
                            SHIFT_IR, RUN_TEST_IDLE};
    tap_state_e n1 [16] = '{TEST_LOGIC_RESET, SELECT_DR_SCAN, SELECT_IR_SCAN,
                            EXIT1_DR, EXIT1_DR, UPDATE_DR, EXIT2_DR, UPDATE_DR,
                            SELECT_DR_SCAN, TEST_LOGIC_RESET, EXIT1_IR, EXIT1_IR,
                            UPDATE_IR, EXIT2_IR, UPDATE_IR, SELECT_DR_SCAN};
    return t ? n1[s] : n0[s];
  endfunction

  task automatic check(bit cond, string what);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL %s (state %s)", what, state.name());
    end
  endtask

  task automatic step(logic t);
    tms = t;
    @(posedge tck);
    #1;
  endtask

  tap_state_e exp;
  initial begin
    #1 trst_n = 0;
    #11 trst_n = 1;
    check(state == TEST_LOGIC_RESET, "TRST* resets");
    check(dr.reset && ir.reset, "reset strobe");
    // DR scan path
    step(0); check(state == RUN_TEST_IDLE && run_idle, "to RTI");
    step(1); check(state == SELECT_DR_SCAN, "sel dr");
    step(0); check(state == CAPTURE_DR && dr.capture, "capture dr");
    step(0); check(state == SHIFT_DR && dr.shift && !ir.shift, "shift dr");
    step(0); check(state == SHIFT_DR, "stay shift dr");
    step(1); check(state == EXIT1_DR, "exit1 dr");
    step(0); check(state == PAUSE_DR, "pause dr");
    step(1); check(state == EXIT2_DR, "exit2 dr");
    step(0); check(state == SHIFT_DR, "resume shift dr");
    step(1); step(1); check(state == UPDATE_DR && dr.update, "update dr");
    // IR scan path
    step(1); step(1); check(state == SELECT_IR_SCAN, "sel ir");
    step(0); check(state == CAPTURE_IR && ir.capture && !dr.capture, "capture ir");
    step(0); check(state == SHIFT_IR && ir.shift, "shift ir");
    step(1); step(1); check(state == UPDATE_IR && ir.update, "update ir");
    step(0); check(state == RUN_TEST_IDLE, "back to RTI");
    // five ones reset from anywhere
    step(1); step(0); step(0);
    repeat (5) step(1);
    check(state == TEST_LOGIC_RESET, "five ones reset");
    // random walk against the reference
    exp = state;
    repeat (2000) begin
      logic t;
      t = 1'($urandom_range(0, 1));
      exp = ref_next(exp, t);
      step(t);
      check(state == exp, "random walk");
      check(run_idle == (exp == RUN_TEST_IDLE), "run_idle decode");
    end
    // asynchronous TRST*
    #2 trst_n = 0; #1;
    check(state == TEST_LOGIC_RESET, "async TRST*");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
