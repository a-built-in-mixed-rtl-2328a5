// Self-checking testbench of the modulator FSM.
//
// For every CHNSEL word it enters observation, follows the pointer for
// several frames and compares it with the list of enabled modulators in
// ascending order, worked out here from the word. It checks that sample_en
// comes exactly once per frame, in the frame's last slot, so that the
// modulators sample every N TCK cycles with N enabled modulators, and that
// nothing is sampled with no modulator enabled or outside observation.
module tb_modulator_fsm;
  import bimbo_pkg::*;
  localparam int NMOD = 4, SW = 2;

  logic tck = 0, trst_n = 1, observe = 0;
  logic [NMOD-1:0] chnsel = '0;
  logic [SW-1:0] sel;
  logic valid, sample_en, frame_start;
  int checks = 0, failures = 0;

  modulator_fsm dut (.*);

  always #5 tck = ~tck;

  initial begin
    #400000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(bit cond, string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL %s (chnsel=%b sel=%0d)", what, chnsel, sel); end
  endtask

  initial begin
    #1 trst_n = 0;
    #11 trst_n = 1;
    for (int w = 0; w < 16; w++) begin
      int list[$];
      int n, last_sample, gaps;
      observe = 0; chnsel = NMOD'(w);
      @(posedge tck); #1;
      check(!sample_en && !valid, "idle outside observation");
      list = {};
      for (int i = 0; i < NMOD; i++) if (w[i]) list.push_back(i);
      n = list.size();
      observe = 1; #1;
      last_sample = -1; gaps = 0;
      for (int c = 0; c < 6 * NMOD; c++) begin
        if (n == 0) begin
          check(!valid && !sample_en, "nothing enabled");
        end else begin
          check(valid, "valid while observing");
          check(int'(sel) == list[c % n], "ascending interleave");
          check(sample_en == ((c % n) == n - 1), "sample at end of frame");
          check(frame_start == ((c % n) == 0), "frame start");
          if (sample_en) begin
            if (last_sample >= 0) begin
              check(c - last_sample == n, "one sample every N TCK");
              gaps++;
            end
            last_sample = c;
          end
        end
        @(posedge tck); #1;
      end
      if (n > 0) check(gaps > 0, "samples seen");
    end
    // leaving and re-entering observation restarts the frame
    observe = 0; chnsel = 4'b1010; @(posedge tck); #1 observe = 1; #1;
    repeat (3) @(posedge tck);
    #1 observe = 0; @(posedge tck); #1 observe = 1; #1;
    check(sel == 1 && frame_start, "restart at lowest enabled");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
