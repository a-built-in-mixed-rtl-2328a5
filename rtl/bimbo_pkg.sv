// Shared types and constants of the BIMBO test logic.
//
// BIMBO (built-in mixed-signal block observer) extends an 1149.4 component
// with a bank of first-order sigma-delta modulators whose bit streams are
// interleaved onto TDO while the TAP sits in Run-Test/Idle. This package holds
// what the TAP-side modules share: the TAP state encoding, the instruction
// opcodes and the bundle of data-register control strobes.
//
// The number of modulators (four) follows the design description. The TAP
// state names follow IEEE 1149.1. The instruction register length and the
// opcodes are this design's own choice.
package bimbo_pkg;

  // Number of first-order modulators and of internal analog bus lines.
  localparam int unsigned NMOD_DEFAULT = 4;

  // IEEE 1149.1 TAP controller states.
  typedef enum logic [3:0] {
    TEST_LOGIC_RESET = 4'h0,
    RUN_TEST_IDLE    = 4'h1,
    SELECT_DR_SCAN   = 4'h2,
    CAPTURE_DR       = 4'h3,
    SHIFT_DR         = 4'h4,
    EXIT1_DR         = 4'h5,
    PAUSE_DR         = 4'h6,
    EXIT2_DR         = 4'h7,
    UPDATE_DR        = 4'h8,
    SELECT_IR_SCAN   = 4'h9,
    CAPTURE_IR       = 4'hA,
    SHIFT_IR         = 4'hB,
    EXIT1_IR         = 4'hC,
    PAUSE_IR         = 4'hD,
    EXIT2_IR         = 4'hE,
    UPDATE_IR        = 4'hF
  } tap_state_e;

  // Instruction register.
  localparam int unsigned IR_LEN = 3;
  typedef logic [IR_LEN-1:0] ir_t;
  localparam ir_t OP_SAMPLE_PRELOAD = 3'b001;
  localparam ir_t OP_CHNSEL         = 3'b100;  // selects the CHNSEL register
  localparam ir_t OP_BIMBO          = 3'b101;  // modulator multiplexer onto TDO
  localparam ir_t OP_BYPASS         = 3'b111;

  // Decoded instruction: which data register sits between TDI and TDO.
  typedef enum logic [1:0] {
    DR_BYPASS = 2'd0,
    DR_ABM    = 2'd1,
    DR_CHNSEL = 2'd2
  } dr_sel_e;

  // Data-register strobes from the TAP controller. Each is high for the TCK
  // cycle whose rising edge performs the action.
  typedef struct packed {
    logic capture;  // state is Capture-DR
    logic shift;    // state is Shift-DR
    logic update;   // state is Update-DR
    logic reset;    // state is Test-Logic-Reset
  } dr_ctrl_t;

endpackage
