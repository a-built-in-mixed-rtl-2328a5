// Self-checking testbench of the bypass register: capture of 0, one-cycle
// shift delay, and no change when not selected or outside Shift-DR.
module tb_bypass_register;
  import bimbo_pkg::*;

  logic tck = 0, trst_n = 1, sel = 0, tdi = 0, tdo;
  dr_ctrl_t dr = '0;
  int checks = 0, failures = 0;

  bypass_register dut (.*);

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

  task automatic clk(dr_ctrl_t c, logic s, logic d);
    dr = c; sel = s; tdi = d;
    @(posedge tck); #1;
  endtask

  logic prev;
  initial begin
    #1 trst_n = 0;
    #11 trst_n = 1;
    clk('{shift:1, default:0}, 1, 1); check(tdo == 1, "shift in 1");
    clk('{capture:1, default:0}, 1, 1); check(tdo == 0, "capture 0");
    prev = 0;
    repeat (200) begin
      logic d;
      d = 1'($urandom_range(0, 1));
      clk('{shift:1, default:0}, 1, d);
      check(tdo == d, "one-cycle delay");
      prev = d;
    end
    clk('{shift:1, default:0}, 0, ~prev); check(tdo == prev, "hold when not selected");
    clk('{update:1, default:0}, 1, ~prev); check(tdo == prev, "hold outside shift");
    clk('{capture:1, default:0}, 0, 1); check(tdo == prev, "no capture when not selected");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
