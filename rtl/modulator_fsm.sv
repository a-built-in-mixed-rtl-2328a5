// Modulator FSM: sequences the interleaving of the modulator bit streams.
//
// While BIMBO observes (the BIMBO instruction is loaded and the TAP is in
// Run-Test/Idle), the FSM points the modulator multiplexer at one enabled
// modulator per TCK cycle, in ascending index order, and wraps around. The set
// of enabled modulators comes from the CHNSEL register. The TCK cycles that
// visit each enabled modulator once form a frame: with N modulators enabled a
// frame lasts N TCK cycles, and the FSM asserts sample_en in its last cycle so
// that all modulators take their next sample together at the end of the
// frame. Each modulator therefore oversamples at TCK/N and every bit of a
// sample reaches TDO exactly once.
//
// When BIMBO is not observing, the pointer rests on the lowest enabled
// modulator, so the first observed cycle always starts a frame. With no
// modulator enabled, nothing is sampled and valid stays low.
//
// Timing: sel and valid are registered on the rising edge of TCK;
// sample_en is decoded from them in the same cycle.
// The interleaving, the CHNSEL control and the TCK/N rate follow the design
// description; the ascending order and the end-of-frame sampling instant are
// this design's choices.
module modulator_fsm
  import bimbo_pkg::*;
#(
  parameter int unsigned NMOD = NMOD_DEFAULT,
  localparam int unsigned SW  = (NMOD > 1) ? $clog2(NMOD) : 1
) (
  input  logic            tck,
  input  logic            trst_n,
  input  logic            observe,    // BIMBO instruction and Run-Test/Idle
  input  logic [NMOD-1:0] chnsel,     // enabled modulators
  output logic [SW-1:0]   sel,        // modulator multiplexer select
  output logic            valid,      // this TCK cycle carries a modulator bit
  output logic            sample_en,  // modulators sample at the next edge
  output logic            frame_start // this cycle is the first slot of a frame
);

  logic [SW-1:0] first, after;
  logic          any, wrap;

  // Lowest enabled modulator, and the next enabled one above sel.
  always_comb begin
    first = '0;
    any   = 1'b0;
    for (int i = NMOD - 1; i >= 0; i--) begin
      if (chnsel[i]) begin
        first = SW'(i);
        any   = 1'b1;
      end
    end
    after = first;
    wrap  = 1'b1;
    for (int i = NMOD - 1; i >= 0; i--) begin
      if (chnsel[i] && (i > int'(sel))) begin
        after = SW'(i);
        wrap  = 1'b0;
      end
    end
  end

  always_ff @(posedge tck or negedge trst_n) begin
    if (!trst_n) begin
      sel         <= '0;
      frame_start <= 1'b1;
    end else if (!observe || !any) begin
      sel         <= first;
      frame_start <= 1'b1;
    end else begin
      sel         <= after;
      frame_start <= wrap;
    end
  end

  assign valid     = observe && any;
  assign sample_en = valid && wrap;

  // While observing, the multiplexer only ever points at an enabled modulator.
  a_sel_enabled: assert property (@(posedge tck) disable iff (!trst_n)
                                  valid |-> chnsel[sel]);

endmodule
