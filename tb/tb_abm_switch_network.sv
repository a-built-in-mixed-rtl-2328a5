// Self-checking testbench of the ABM switch network model: random pin
// voltages and SBx settings; every bus line must carry the mean of the pins
// switched onto it, and be flagged undriven when no switch is closed.
module tb_abm_switch_network;
  localparam int NPINS = 4, NMOD = 4;

  real pin_v [NPINS];
  logic [NPINS-1:0][NMOD-1:0] sbx;
  real line_v [NMOD];
  logic [NMOD-1:0] line_driven;
  int checks = 0, failures = 0;

  abm_switch_network dut (.*);

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (500) begin
      for (int p = 0; p < NPINS; p++) pin_v[p] = real'($urandom_range(0, 1000)) / 1000.0;
      sbx = 16'($urandom);
      #1;
      for (int x = 0; x < NMOD; x++) begin
        real s, e;
        int n;
        s = 0.0; n = 0;
        for (int p = 0; p < NPINS; p++) if (sbx[p][x]) begin s += pin_v[p]; n++; end
        e = (n == 0) ? 0.0 : s / n;
        checks++;
        if (line_driven[x] != (n != 0) || line_v[x] > e + 1e-9 || line_v[x] < e - 1e-9) begin
          failures++;
          $display("FAIL line %0d: %f expected %f (n=%0d)", x, line_v[x], e, n);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
