// CHNSEL: the optional 1149.4 data register that enables modulator stages.
//
// One bit per first-order modulator; bit i set means modulator i takes part
// in the interleaving on TDO. Any combination may be chosen, and the bit
// streams of disabled modulators are left out. The register has a shift stage
// (TDI enters at the top bit, bit 0 leaves towards TDO) and an update stage
// that holds the word the modulator FSM uses. Capture-DR loads the shift stage
// with the word in force, so a scan reads back the current setting.
// Test-Logic-Reset clears the update stage (no modulator enabled).
// The width and purpose follow the design description; capture and reset
// values are this design's choice.
module chnsel_register
  import bimbo_pkg::*;
#(
  parameter int unsigned NMOD = NMOD_DEFAULT
) (
  input  logic            tck,
  input  logic            trst_n,
  input  dr_ctrl_t        dr,
  input  logic            sel,     // CHNSEL is the selected data register
  input  logic            tdi,
  output logic            tdo,
  output logic [NMOD-1:0] chnsel   // update stage: enabled modulators
);

  logic [NMOD-1:0] shift_q;

  always_ff @(posedge tck or negedge trst_n) begin
    if (!trst_n) begin
      shift_q <= '0;
      chnsel  <= '0;
    end else begin
      if (sel && dr.capture)    shift_q <= chnsel;
      else if (sel && dr.shift) shift_q <= {tdi, shift_q[NMOD-1:1]};
      if (dr.reset)                chnsel <= '0;
      else if (sel && dr.update)   chnsel <= shift_q;
    end
  end

  assign tdo = shift_q[0];

endmodule
