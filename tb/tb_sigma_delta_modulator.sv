// Self-checking testbench of the first-order sigma-delta modulator model.
//
// Applies DC inputs across the reference range and a slow ramp. Every output
// bit is compared with a reference error-feedback loop computed here, and
// over each 1000-sample window the density of ones must match
// (ain - VREFN) / (VREFP - VREFN) within two bits, the bound of a first-order
// loop. With sample_en low the output must hold.
module tb_sigma_delta_modulator;
  localparam real VP = 1.0, VN = 0.0;  // the model's default reference levels
  localparam int  NS = 1000;

  logic tck = 0, trst_n = 1, sample_en = 0, bit_out;
  real ain = 0.0;
  int checks = 0, failures = 0;

  sigma_delta_modulator dut (.*);

  always #5 tck = ~tck;

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(bit cond, string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL %s ain=%f", what, ain); end
  endtask

  // Reference: quantisation error accumulates; the output is one whenever the
  // accumulated error is not negative.
  real acc;
  logic exp_bit;

  initial begin
    real levels[7] = '{0.0, 0.1, 0.25, 0.5, 0.6666, 0.9, 1.0};
    #1 trst_n = 0;
    #11 trst_n = 1;
    acc = 0.0;
    check(bit_out == 1, "cleared integrator gives a one");
    foreach (levels[k]) begin
      int ones;
      real dens;
      ain = levels[k];
      ones = 0;
      sample_en = 1;
      for (int i = 0; i < NS; i++) begin
        exp_bit = (acc >= 0.0);
        check(bit_out == exp_bit, "bit-exact against reference");
        ones += int'(bit_out);
        acc = acc + (ain - (exp_bit ? VP : VN));
        @(posedge tck); #1;
      end
      dens = real'(ones) / real'(NS);
      check((dens - (ain - VN) / (VP - VN)) < 2.0 / NS &&
            ((ain - VN) / (VP - VN) - dens) < 2.0 / NS, "ones density");
      // hold without sample_en
      sample_en = 0;
      exp_bit = bit_out;
      repeat (5) begin @(posedge tck); #1; check(bit_out == exp_bit, "hold"); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
