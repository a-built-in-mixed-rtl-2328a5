// BIMBO test logic: the digital part of the BIMBO extension of an 1149.4
// component, without the analog switches and modulators.
//
// Contains the TAP controller, the instruction register, the bypass register,
// the ABM control register (SBx words, loaded by SAMPLE/PRELOAD), the CHNSEL
// register, the modulator FSM, the modulator multiplexer and the TDO output
// stage. Towards the analog side it drives the SBx switch controls and the
// common sampling strobe of the modulator bank, and it reads back the
// modulators' output bits. When the BIMBO instruction is loaded and the TAP is
// in Run-Test/Idle, the FSM steps the multiplexer over the modulators enabled
// in CHNSEL, one per TCK, and strobes a new sample at the end of every frame.
//
// Timing: registers change on the rising edge of TCK; TDO and its enable
// change on the falling edge, as 1149.1 requires. TDO is enabled in Shift-IR,
// Shift-DR and while BIMBO observes. The blocks and their roles follow the
// design description; the opcodes, bit orders and idle values are this
// design's choices (see the submodules).
module bimbo_core
  import bimbo_pkg::*;
#(
  parameter int unsigned NPINS = 4,
  parameter int unsigned NMOD  = NMOD_DEFAULT
) (
  input  logic                       tck,
  input  logic                       trst_n,
  input  logic                       tms,
  input  logic                       tdi,
  output logic                       tdo,
  output logic                       tdo_en,
  output logic [NPINS-1:0][NMOD-1:0] sbx,        // SBx controls, 1 = closed
  output logic                       sample_en,  // bank samples at next edge
  input  logic [NMOD-1:0]            mod_bits,   // modulator output bits
  output logic                       observing,  // BIMBO streams onto TDO
  output logic                       frame_start // first slot of a frame
);

  localparam int unsigned SW = (NMOD > 1) ? $clog2(NMOD) : 1;

  // ---------------------------------------------------------------- TAP
  tap_state_e state;  // not used here; visible for debug
  dr_ctrl_t   dr, ir;
  logic       run_idle;

  tap_controller u_tap (
    .tck, .trst_n, .tms,
    .state, .dr, .ir, .run_idle
  );

  ir_t     instr;
  dr_sel_e dr_sel;
  logic    bimbo_en, sbx_apply, ir_tdo;

  instruction_register u_ir (
    .tck, .trst_n, .ir, .tdi,
    .tdo(ir_tdo), .instr, .dr_sel, .bimbo_en, .sbx_apply
  );

  // ---------------------------------------------------- data registers
  logic byp_tdo, abm_tdo, chn_tdo;
  logic [NMOD-1:0]            chnsel;

  bypass_register u_bypass (
    .tck, .trst_n, .dr, .sel(dr_sel == DR_BYPASS), .tdi, .tdo(byp_tdo)
  );

  abm_control_register #(.NPINS(NPINS), .NMOD(NMOD)) u_abm (
    .tck, .trst_n, .dr, .sel(dr_sel == DR_ABM), .sbx_apply, .tdi,
    .tdo(abm_tdo), .sbx
  );

  chnsel_register #(.NMOD(NMOD)) u_chnsel (
    .tck, .trst_n, .dr, .sel(dr_sel == DR_CHNSEL), .tdi,
    .tdo(chn_tdo), .chnsel
  );

  // --------------------------------------------- interleaving onto TDO
  logic          observe, slot_valid, mux_bit;
  logic [SW-1:0] mux_sel;

  assign observe = bimbo_en && run_idle;

  modulator_fsm #(.NMOD(NMOD)) u_fsm (
    .tck, .trst_n, .observe, .chnsel,
    .sel(mux_sel), .valid(slot_valid), .sample_en, .frame_start
  );

  modulator_mux #(.NMOD(NMOD)) u_mux (
    .mod_bits, .sel(mux_sel), .valid(slot_valid), .bit_out(mux_bit)
  );

  // ------------------------------------------------ TDO output stage
  logic tdo_d;

  always_comb begin
    if (ir.shift) tdo_d = ir_tdo;
    else if (dr.shift) begin
      unique case (dr_sel)
        DR_ABM:    tdo_d = abm_tdo;
        DR_CHNSEL: tdo_d = chn_tdo;
        default:   tdo_d = byp_tdo;
      endcase
    end
    else tdo_d = mux_bit;
  end

  always_ff @(negedge tck or negedge trst_n) begin
    if (!trst_n) begin
      tdo    <= 1'b0;
      tdo_en <= 1'b0;
    end else begin
      tdo    <= tdo_d;
      tdo_en <= ir.shift || dr.shift || observe;
    end
  end

  assign observing = observe;

endmodule
