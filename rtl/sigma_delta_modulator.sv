// Behavioural model of a first-order sigma-delta modulator (analog part).
//
// The real block is a switched-capacitor or continuous-time integrator, a
// comparator and a 1-bit DAC in the feedback path; it is analog and has no
// synthesizable form, so this file models it in discrete time with real
// arithmetic. On every rising TCK edge with sample_en high the integrator
// adds the input minus the DAC level chosen by the present output bit:
//     v <= v + (ain - (bit ? VREFP : VREFN))
// and the output bit is the comparator decision bit = (v >= 0). Over many
// samples the density of ones equals (ain - VREFN) / (VREFP - VREFN) for
// VREFN <= ain <= VREFP. TRST* clears the integrator, which makes the first
// bit a one.
//
// Ports: ain is the voltage on the internal analog bus line feeding the
// modulator, bit is the 1-bit output stream. All modulators of the bank share
// TCK, so they sample together. The first-order topology and the shared clock
// follow the design description; the reference levels and the discrete-time
// formulation are this model's choices.
module sigma_delta_modulator #(
  parameter real VREFP = 1.0,   // DAC level for a one
  parameter real VREFN = 0.0    // DAC level for a zero
) (
  input  logic tck,
  input  logic trst_n,
  input  logic sample_en,
  input  real  ain,
  output logic bit_out
);

  real integ;

  always_ff @(posedge tck or negedge trst_n) begin
    if (!trst_n)        integ <= 0.0;
    else if (sample_en) integ <= integ + (ain - (bit_out ? VREFP : VREFN));
  end

  assign bit_out = (integ >= 0.0);

endmodule
