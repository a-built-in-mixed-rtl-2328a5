// BIMBO: an 1149.4 component whose test logic can stream several analog pins
// out through TDO at once.
//
// In a plain 1149.4 board every AT2 pin sits on one shared wire, so only one
// analog pin can be observed at a time. BIMBO adds a bank of NMOD first-order
// sigma-delta modulators inside the component. The ABM switches SBx route the
// chosen pins onto the lines of a partitioned internal analog bus, one line
// per modulator; the modulators turn the lines into 1-bit streams; and a
// multiplexer, stepped by a small FSM, interleaves the streams of the
// modulators enabled in the CHNSEL register onto TDO, one bit per TCK, while
// the TAP rests in Run-Test/Idle. Decimation filters sit off-chip in the test
// controller. With N modulators enabled each of them samples at TCK/N.
//
// Access protocol (from the design description):
//   1. SAMPLE/PRELOAD: shift the NMOD-bit SBx word of every ABM into the ABM
//      control register (pin 0 first, bit 0 first).
//   2. CHNSEL instruction: shift the NMOD-bit word of enabled modulators.
//   3. BIMBO instruction, then go to Run-Test/Idle.
//   4. Every TCK cycle in Run-Test/Idle puts the next interleaved bit on TDO.
//
// Interface: the four TAP pins (TRST* included), TDO with its enable, the
// analog pin voltages, and the internal analog bus lines, brought out for the
// 1149.4 bus interface circuit, which this design does not contain.
// Timing: the TAP works on the rising edge of TCK and TDO changes on the
// falling edge, as 1149.1 requires. TDO is enabled in Shift-IR, Shift-DR and
// while BIMBO observes. In a frame the bits leave TDO in ascending modulator
// order, and all bits of a frame belong to the same sample instant.
// The structure and the protocol follow the design description. The opcodes,
// the pin count, the register bit orders and the modulator reference levels
// are this design's choices.
module bimbo_top
  import bimbo_pkg::*;
#(
  parameter int unsigned NPINS = 4,
  parameter int unsigned NMOD  = NMOD_DEFAULT,
  parameter real         VREFP = 1.0,
  parameter real         VREFN = 0.0
) (
  input  logic            tck,
  input  logic            trst_n,
  input  logic            tms,
  input  logic            tdi,
  output logic            tdo,
  output logic            tdo_en,
  input  real             pin_v [NPINS],
  output real             line_v [NMOD],
  output logic [NMOD-1:0] line_driven
);

  logic [NPINS-1:0][NMOD-1:0] sbx;
  logic [NMOD-1:0]            mod_bits;
  logic                       sample_en, observing, frame_start;

  // Digital test logic: TAP, registers, FSM, multiplexer, TDO stage.
  bimbo_core #(.NPINS(NPINS), .NMOD(NMOD)) u_core (
    .tck, .trst_n, .tms, .tdi, .tdo, .tdo_en,
    .sbx, .sample_en, .mod_bits, .observing, .frame_start
  );

  // ------------------------------------------ analog front end and bank
  abm_switch_network #(.NPINS(NPINS), .NMOD(NMOD)) u_abm_sw (
    .pin_v, .sbx, .line_v, .line_driven
  );

  for (genvar m = 0; m < NMOD; m++) begin : g_mod
    sigma_delta_modulator #(.VREFP(VREFP), .VREFN(VREFN)) u_sdm (
      .tck, .trst_n, .sample_en, .ain(line_v[m]), .bit_out(mod_bits[m])
    );
  end

endmodule
