// 1149.1 instruction register with the BIMBO instruction decoder.
//
// A shift stage captures the fixed pattern ...01 in Capture-IR, shifts from
// TDI towards TDO (LSB first) in Shift-IR, and its contents move into the
// update stage in Update-IR. Test-Logic-Reset loads BYPASS into the update
// stage. The decoder turns the current instruction into the data-register
// selection and two flags:
//   SAMPLE/PRELOAD  selects the ABM control register,
//   CHNSEL          selects the CHNSEL register (optional BIMBO instruction),
//   BIMBO           selects the bypass register for scans, applies the
//                   preloaded SBx settings and lets the modulator multiplexer
//                   drive TDO in Run-Test/Idle (optional BIMBO instruction),
//   BYPASS and every other opcode select the bypass register.
// The instruction set follows the design's access protocol; the 3-bit length,
// the opcodes and the reset instruction are this design's choices.
module instruction_register
  import bimbo_pkg::*;
(
  input  logic     tck,
  input  logic     trst_n,
  input  dr_ctrl_t ir,          // strobes from the TAP controller
  input  logic     tdi,
  output logic     tdo,         // last bit of the shift stage
  output ir_t      instr,       // update stage
  output dr_sel_e  dr_sel,
  output logic     bimbo_en,    // BIMBO instruction active
  output logic     sbx_apply    // preloaded SBx settings drive the switches
);

  ir_t shift_q;

  always_ff @(posedge tck or negedge trst_n) begin
    if (!trst_n) begin
      shift_q <= '0;
      instr   <= OP_BYPASS;
    end else begin
      if (ir.capture)    shift_q <= ir_t'(1);   // ...01 as 1149.1 requires
      else if (ir.shift) shift_q <= {tdi, shift_q[IR_LEN-1:1]};
      if (ir.reset)       instr <= OP_BYPASS;
      else if (ir.update) instr <= shift_q;
    end
  end

  assign tdo = shift_q[0];

  always_comb begin
    bimbo_en  = 1'b0;
    sbx_apply = 1'b0;
    unique case (instr)
      OP_SAMPLE_PRELOAD: dr_sel = DR_ABM;
      OP_CHNSEL:         dr_sel = DR_CHNSEL;
      OP_BIMBO: begin
        dr_sel    = DR_BYPASS;
        bimbo_en  = 1'b1;
        sbx_apply = 1'b1;
      end
      default:           dr_sel = DR_BYPASS;
    endcase
  end

endmodule
