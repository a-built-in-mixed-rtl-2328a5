// Modulator multiplexer: puts one modulator bit stream on the TDO path.
//
// Selects bit `sel` of the modulator outputs when the slot is valid and
// drives 0 otherwise (no modulator enabled, or BIMBO not observing). Driven by
// the modulator FSM, it interleaves the bank's bit streams one bit per TCK.
// Purely combinational; the TDO output stage retimes the result on the falling
// edge of TCK. The multiplexer follows the design description; the idle value
// is this design's choice.
module modulator_mux
  import bimbo_pkg::*;
#(
  parameter int unsigned NMOD = NMOD_DEFAULT,
  localparam int unsigned SW  = (NMOD > 1) ? $clog2(NMOD) : 1
) (
  input  logic [NMOD-1:0] mod_bits,  // current output bit of every modulator
  input  logic [SW-1:0]   sel,
  input  logic            valid,
  output logic            bit_out
);

  always_comb begin
    bit_out = 1'b0;
    if (valid && (int'(sel) < NMOD)) bit_out = mod_bits[sel];
  end

endmodule
