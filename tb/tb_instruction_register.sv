// Self-checking testbench of the instruction register and decoder.
//
// Loads every opcode through Capture-IR / Shift-IR / Update-IR strobes,
// checks that the captured pattern ...01 leaves on TDO while the opcode is
// shifted in, and checks the decoded register selection and BIMBO flags
// against a table of the instruction set. Test-Logic-Reset must restore
// BYPASS.
module tb_instruction_register;
  import bimbo_pkg::*;

  logic tck = 0, trst_n = 1, tdi = 0, tdo;
  dr_ctrl_t ir = '0;
  ir_t instr;
  dr_sel_e dr_sel;
  logic bimbo_en, sbx_apply;
  int checks = 0, failures = 0;

  instruction_register dut (.*);

  always #5 tck = ~tck;

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(bit cond, string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL %s", what); end
  endtask

  task automatic load(logic [IR_LEN-1:0] op);
    logic [IR_LEN-1:0] seen;
    ir = '{capture:1, default:0}; @(posedge tck); #1;
    for (int i = 0; i < IR_LEN; i++) begin
      seen[i] = tdo;
      ir = '{shift:1, default:0}; tdi = op[i]; @(posedge tck); #1;
    end
    check(seen == 3'b001, "captured ...01 shifted out");
    ir = '{update:1, default:0}; @(posedge tck); #1;
    ir = '0;
    check(instr == op, "update stage");
  endtask

  initial begin
    #1 trst_n = 0;
    #11 trst_n = 1;
    check(instr == 3'b111 && dr_sel == DR_BYPASS, "reset instruction BYPASS");
    for (int op = 0; op < 8; op++) begin
      dr_sel_e e_sel;
      logic e_bimbo;
      load(3'(op));
      e_sel   = (op == 1) ? DR_ABM : (op == 4) ? DR_CHNSEL : DR_BYPASS;
      e_bimbo = (op == 5);
      check(dr_sel == e_sel, "register selection");
      check(bimbo_en == e_bimbo && sbx_apply == e_bimbo, "BIMBO flags");
    end
    load(3'b101);
    ir = '{reset:1, default:0}; @(posedge tck); #1; ir = '0;
    check(instr == 3'b111 && !bimbo_en, "Test-Logic-Reset restores BYPASS");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
