// Self-checking testbench of the CHNSEL register: random words are shifted
// in LSB first, must appear on the update stage only after Update-DR, are
// read back by the next capture, and are cleared by Test-Logic-Reset.
module tb_chnsel_register;
  import bimbo_pkg::*;
  localparam int NMOD = 4;

  logic tck = 0, trst_n = 1, sel = 0, tdi = 0, tdo;
  dr_ctrl_t dr = '0;
  logic [NMOD-1:0] chnsel;
  int checks = 0, failures = 0;

  chnsel_register dut (.*);

  always #5 tck = ~tck;

  initial begin
    #200000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(bit cond, string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL %s", what); end
  endtask

  // One DR scan: returns the bits that left on TDO.
  task automatic scan(logic [NMOD-1:0] w, logic s, output logic [NMOD-1:0] out);
    sel = s;
    dr = '{capture:1, default:0}; @(posedge tck); #1;
    for (int i = 0; i < NMOD; i++) begin
      out[i] = tdo;
      dr = '{shift:1, default:0}; tdi = w[i]; @(posedge tck); #1;
    end
    dr = '{update:1, default:0}; @(posedge tck); #1;
    dr = '0;
  endtask

  logic [NMOD-1:0] cur, w, out;
  initial begin
    #1 trst_n = 0;
    #11 trst_n = 1;
    check(chnsel == 0, "reset value");
    cur = 0;
    repeat (50) begin
      w = NMOD'($urandom);
      scan(w, 1, out);
      check(out == cur, "capture reads back word in force");
      check(chnsel == w, "update stage holds new word");
      cur = w;
    end
    scan(~cur, 0, out);
    check(chnsel == cur, "unselected scan leaves word");
    // shifting alone must not change the update stage
    sel = 1;
    dr = '{shift:1, default:0}; tdi = ~cur[0]; @(posedge tck); #1; dr = '0;
    check(chnsel == cur, "no change before Update-DR");
    dr = '{reset:1, default:0}; @(posedge tck); #1; dr = '0;
    check(chnsel == 0, "Test-Logic-Reset clears");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
