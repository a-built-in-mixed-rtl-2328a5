// 1149.1 bypass register: one shift cell between TDI and TDO.
//
// Captures 0 in Capture-DR and shifts TDI in Shift-DR when selected, so a
// component in BYPASS adds one TCK of delay to the scan chain. It is the cell
// the other components on the board contribute to the transport chain that
// carries the BIMBO bit streams.
module bypass_register
  import bimbo_pkg::*;
(
  input  logic     tck,
  input  logic     trst_n,
  input  dr_ctrl_t dr,
  input  logic     sel,     // bypass register is the selected data register
  input  logic     tdi,
  output logic     tdo
);

  always_ff @(posedge tck or negedge trst_n) begin
    if (!trst_n)                tdo <= 1'b0;
    else if (sel && dr.capture) tdo <= 1'b0;
    else if (sel && dr.shift)   tdo <= tdi;
  end

endmodule
