// IEEE 1149.1 TAP controller.
//
// The sixteen-state machine that every 1149.1/1149.4 component carries. The
// state advances on the rising edge of TCK as TMS dictates; TRST* (active low,
// asynchronous) forces Test-Logic-Reset, and so do five TCK cycles with TMS
// high. BIMBO uses the Run-Test/Idle state: while the BIMBO instruction is
// loaded and the controller idles there, every TCK cycle carries one
// interleaved modulator bit to TDO.
//
// Outputs are decoded from the current state, so a strobe such as dr.shift is
// high for the TCK cycle whose rising edge performs the shift. The state
// diagram is the one of the standard; the optional TRST* pin is included.
module tap_controller
  import bimbo_pkg::*;
(
  input  logic       tck,
  input  logic       trst_n,
  input  logic       tms,
  output tap_state_e state,
  output dr_ctrl_t   dr,          // data-register strobes
  output dr_ctrl_t   ir,          // instruction-register strobes
  output logic       run_idle     // state is Run-Test/Idle
);

  tap_state_e next;

  always_comb begin
    unique case (state)
      TEST_LOGIC_RESET: next = tms ? TEST_LOGIC_RESET : RUN_TEST_IDLE;
      RUN_TEST_IDLE:    next = tms ? SELECT_DR_SCAN   : RUN_TEST_IDLE;
      SELECT_DR_SCAN:   next = tms ? SELECT_IR_SCAN   : CAPTURE_DR;
      CAPTURE_DR:       next = tms ? EXIT1_DR         : SHIFT_DR;
      SHIFT_DR:         next = tms ? EXIT1_DR         : SHIFT_DR;
      EXIT1_DR:         next = tms ? UPDATE_DR        : PAUSE_DR;
      PAUSE_DR:         next = tms ? EXIT2_DR         : PAUSE_DR;
      EXIT2_DR:         next = tms ? UPDATE_DR        : SHIFT_DR;
      UPDATE_DR:        next = tms ? SELECT_DR_SCAN   : RUN_TEST_IDLE;
      SELECT_IR_SCAN:   next = tms ? TEST_LOGIC_RESET : CAPTURE_IR;
      CAPTURE_IR:       next = tms ? EXIT1_IR         : SHIFT_IR;
      SHIFT_IR:         next = tms ? EXIT1_IR         : SHIFT_IR;
      EXIT1_IR:         next = tms ? UPDATE_IR        : PAUSE_IR;
      PAUSE_IR:         next = tms ? EXIT2_IR         : PAUSE_IR;
      EXIT2_IR:         next = tms ? UPDATE_IR        : SHIFT_IR;
      UPDATE_IR:        next = tms ? SELECT_DR_SCAN   : RUN_TEST_IDLE;
      default:          next = TEST_LOGIC_RESET;
    endcase
  end

  always_ff @(posedge tck or negedge trst_n) begin
    if (!trst_n) state <= TEST_LOGIC_RESET;
    else         state <= next;
  end

  always_comb begin
    dr.capture = (state == CAPTURE_DR);
    dr.shift   = (state == SHIFT_DR);
    dr.update  = (state == UPDATE_DR);
    dr.reset   = (state == TEST_LOGIC_RESET);
    ir.capture = (state == CAPTURE_IR);
    ir.shift   = (state == SHIFT_IR);
    ir.update  = (state == UPDATE_IR);
    ir.reset   = (state == TEST_LOGIC_RESET);
    run_idle   = (state == RUN_TEST_IDLE);
  end

endmodule
