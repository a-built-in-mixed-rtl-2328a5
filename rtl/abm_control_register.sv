// ABM control structure: the boundary-register section that sets the SBx
// switches of the analog boundary modules.
//
// Every analog pin has an analog boundary module (ABM) whose SBx switches
// connect the pin to internal analog bus line x. The control word of one ABM
// is NMOD bits, bit x closing SBx. The NPINS words form one shift register
// selected by SAMPLE/PRELOAD: TDI enters at the word of the last pin, bit 0 of
// pin 0 leaves first towards TDO. Update-DR copies the shift stage into the
// update stage. The update stage acts on the switches only while the BIMBO
// instruction is in force (sbx_apply); otherwise every SBx is open and the pin
// stays in mission mode. Capture-DR loads the shift stage with the update
// stage, so a scan reads back the preloaded words.
// Loading the words with SAMPLE/PRELOAD follows the design description. The
// pin count, the bit order, the capture value and the reset value (all open)
// are this design's choices.
module abm_control_register
  import bimbo_pkg::*;
#(
  parameter int unsigned NPINS = 4,
  parameter int unsigned NMOD  = NMOD_DEFAULT
) (
  input  logic                       tck,
  input  logic                       trst_n,
  input  dr_ctrl_t                   dr,
  input  logic                       sel,        // SAMPLE/PRELOAD in force
  input  logic                       sbx_apply,  // BIMBO instruction in force
  input  logic                       tdi,
  output logic                       tdo,
  output logic [NPINS-1:0][NMOD-1:0] sbx         // switch controls, 1 = closed
);

  localparam int unsigned LEN = NPINS * NMOD;

  logic [LEN-1:0] shift_q, update_q;

  always_ff @(posedge tck or negedge trst_n) begin
    if (!trst_n) begin
      shift_q  <= '0;
      update_q <= '0;
    end else begin
      if (sel && dr.capture)    shift_q <= update_q;
      else if (sel && dr.shift) shift_q <= {tdi, shift_q[LEN-1:1]};
      if (dr.reset)              update_q <= '0;
      else if (sel && dr.update) update_q <= shift_q;
    end
  end

  assign tdo = shift_q[0];
  assign sbx = sbx_apply ? update_q : '0;

endmodule
