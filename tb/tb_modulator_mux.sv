// Self-checking testbench of the modulator multiplexer: every combination of
// modulator bits, select value and valid flag.
module tb_modulator_mux;
  localparam int NMOD = 4;

  logic [NMOD-1:0] mod_bits;
  logic [1:0] sel;
  logic valid, bit_out;
  int checks = 0, failures = 0;

  modulator_mux dut (.*);

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int b = 0; b < 16; b++)
      for (int s = 0; s < 4; s++)
        for (int v = 0; v < 2; v++) begin
          mod_bits = 4'(b); sel = 2'(s); valid = 1'(v);
          #1;
          checks++;
          if (bit_out !== (v ? ((b >> s) & 1) : 0)) begin
            failures++;
            $display("FAIL bits=%b sel=%0d valid=%0d out=%b", mod_bits, sel, valid, bit_out);
          end
        end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
