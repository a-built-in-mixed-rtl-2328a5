// Behavioural model of the ABM switching structures and the partitioned
// internal analog test bus (analog part).
//
// Each analog pin has an analog boundary module whose SBx switch x connects
// the pin to internal analog bus line x; the bus is partitioned into NMOD
// lines so that each first-order modulator observes a line of its own. The
// SD switch, which connects the core to the pin, stays closed: observation
// is non-intrusive and the circuit keeps running in mission mode. The
// switches are analog and have no synthesizable form; this model treats every
// closed SBx as the same resistance and every pin as a stiff source, so a line
// settles at the mean voltage of the pins connected to it. A line with no
// closed switch is reported undriven and modelled at 0.0.
//
// Ports: pin_v holds the pin voltages, sbx[p][x] closes SBx of pin p, line_v
// and line_driven describe the NMOD bus lines. The model is combinational.
// One line per modulator and the SBx/SD roles follow the design description;
// the equal-resistance averaging and the undriven value are this model's
// choices.
module abm_switch_network #(
  parameter int unsigned NPINS = 4,
  parameter int unsigned NMOD  = 4
) (
  input  real                        pin_v [NPINS],
  input  logic [NPINS-1:0][NMOD-1:0] sbx,
  output real                        line_v [NMOD],
  output logic [NMOD-1:0]            line_driven
);

  always_comb begin
    for (int x = 0; x < NMOD; x++) begin
      real sum;
      int  n;
      sum = 0.0;
      n   = 0;
      for (int p = 0; p < NPINS; p++) begin
        if (sbx[p][x]) begin
          sum += pin_v[p];
          n++;
        end
      end
      line_driven[x] = (n != 0);
      line_v[x]      = (n != 0) ? sum / real'(n) : 0.0;
    end
  end

endmodule
