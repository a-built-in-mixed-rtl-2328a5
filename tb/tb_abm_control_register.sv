// Self-checking testbench of the ABM control register: random SBx words for
// every pin are shifted in (pin 0 bit 0 first), must reach the switches only
// while sbx_apply is high, and are read back by the next capture.
module tb_abm_control_register;
  import bimbo_pkg::*;
  localparam int NPINS = 4, NMOD = 4, LEN = NPINS * NMOD;

  logic tck = 0, trst_n = 1, sel = 0, sbx_apply = 0, tdi = 0, tdo;
  dr_ctrl_t dr = '0;
  logic [NPINS-1:0][NMOD-1:0] sbx;
  int checks = 0, failures = 0;

  abm_control_register dut (.*);

  always #5 tck = ~tck;

  initial begin
    #400000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(bit cond, string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL %s", what); end
  endtask

  task automatic scan(logic [LEN-1:0] w, output logic [LEN-1:0] out);
    sel = 1;
    dr = '{capture:1, default:0}; @(posedge tck); #1;
    for (int i = 0; i < LEN; i++) begin
      out[i] = tdo;
      dr = '{shift:1, default:0}; tdi = w[i]; @(posedge tck); #1;
    end
    dr = '{update:1, default:0}; @(posedge tck); #1;
    dr = '0; sel = 0;
  endtask

  logic [LEN-1:0] cur, w, out;
  initial begin
    #1 trst_n = 0;
    #11 trst_n = 1;
    cur = 0;
    repeat (40) begin
      w = {$urandom, $urandom};
      scan(w, out);
      check(out == cur, "capture reads back preloaded words");
      sbx_apply = 0; #1;
      check(sbx == '0, "switches open without BIMBO instruction");
      sbx_apply = 1; #1;
      for (int p = 0; p < NPINS; p++)
        for (int x = 0; x < NMOD; x++)
          check(sbx[p][x] == w[p*NMOD + x], "SBx of pin p, line x");
      sbx_apply = 0;
      cur = w;
    end
    dr = '{reset:1, default:0}; sbx_apply = 1; @(posedge tck); #1; dr = '0;
    check(sbx == '0, "Test-Logic-Reset opens all switches");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
