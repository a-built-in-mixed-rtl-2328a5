// Measurement testbench at the operating point the design is sized for:
// TCK at 20 MHz and an oversampling factor of 500.
//
// Sine waves drive the analog pins. The testbench, acting as the external
// controller, configures BIMBO through the TAP, collects the interleaved
// stream from TDO, splits it per modulator and decimates each stream with a
// 500-sample boxcar (count of ones). Two sessions are run:
//   - four pins at once: each modulator samples at TCK/4 = 5 MHz, one output
//     per 100 us (10 kHz output rate);
//   - one pin alone: the modulator samples at 20 MHz, one output per 25 us
//     (40 kHz output rate).
// Every decimated value must equal the mean of the pin voltage at the
// sampling instants within 2/500 (the bound of a first-order loop whose
// integrator stays within two reference steps), and must match the exact average
// of the sine over the window within 0.01.
`timescale 1ns/1ps
module tb_bimbo_workload;
  import bimbo_pkg::*;
  localparam int  NPINS = 4, NMOD = 4, OSR = 500;
  localparam real TCK_NS = 50.0;          // 20 MHz
  localparam real PI = 3.14159265358979;

  logic tck = 0, trst_n = 1, tms = 1, tdi = 0;
  logic tdo, tdo_en;
  real pin_v [NPINS];
  real line_v [NMOD];
  logic [NMOD-1:0] line_driven;

  bimbo_top dut (.*);

  int checks = 0, failures = 0, outputs = 0;
  real freq_hz [NPINS] = '{1000.0, 2000.0, 3000.0, 4000.0};

  always #(TCK_NS / 2.0) tck = ~tck;

  int cycles = 0;
  always @(posedge tck) begin
    cycles++;
    if (cycles > 100000) begin
      failures++;
      $display("FAIL watchdog");
      $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
      $finish;
    end
  end

  function automatic real sine(int p, real t_ns);
    return 0.5 + 0.4 * $sin(2.0 * PI * freq_hz[p] * t_ns * 1e-9 + 0.7 * p);
  endfunction

  // Exact average of the pin's sine over [ta, tb].
  function automatic real window_mean(int p, real ta, real tb);
    real w, a, b;
    w = 2.0 * PI * freq_hz[p] * 1e-9;
    a = w * ta + 0.7 * p;
    b = w * tb + 0.7 * p;
    return 0.5 + 0.4 * ($cos(a) - $cos(b)) / (b - a);
  endfunction

  // Pins follow their sine; they change just after each falling edge.
  always @(negedge tck) for (int p = 0; p < NPINS; p++) pin_v[p] = sine(p, $realtime);

  task automatic check(bit cond, string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL %s", what); end
  endtask

  task automatic step(logic m, logic d, output logic o);
    @(negedge tck);
    tms = m; tdi = d;
    @(posedge tck);
    o = tdo;
  endtask

  task automatic step0(logic m);
    logic o;
    step(m, 0, o);
  endtask

  task automatic scan(bit is_ir, int n, logic [63:0] din);
    logic o;
    step0(1);
    if (is_ir) step0(1);
    step0(0);
    step0(0);
    for (int i = 0; i < n; i++) step(i == n - 1, din[i], o);
    step0(1);
    step0(0);
  endtask

  // Observe `windows` decimation windows of the enabled modulators.
  task automatic session(logic [NPINS-1:0][NMOD-1:0] sbxw, logic [NMOD-1:0] chw,
                         int windows);
    int list[$], n, line_pin[NMOD];
    int ones[NMOD];
    real vsum[NMOD];
    real t0, t_start;
    logic o;
    list = {};
    for (int i = 0; i < NMOD; i++) if (chw[i]) list.push_back(i);
    n = list.size();
    for (int x = 0; x < NMOD; x++) begin
      line_pin[x] = -1;
      for (int p = 0; p < NPINS; p++) if (sbxw[p][x]) line_pin[x] = p;
    end
    scan(1, IR_LEN, 64'(OP_SAMPLE_PRELOAD));
    scan(0, NPINS * NMOD, 64'(sbxw));
    scan(1, IR_LEN, 64'(OP_CHNSEL));
    scan(0, NMOD, 64'(chw));
    scan(1, IR_LEN, 64'(OP_BIMBO));        // now in Run-Test/Idle
    for (int w = 0; w < windows; w++) begin
      ones = '{default: 0};
      vsum = '{default: 0.0};
      t_start = $realtime;
      for (int f = 0; f < OSR; f++) begin
        for (int k = 0; k < n; k++) begin
          step((w == windows - 1) && (f == OSR - 1) && (k == n - 1), 0, o);
          ones[list[k]] += int'(o);
        end
        // all modulators sampled at this rising edge the pin values that
        // were applied after the previous falling edge
        foreach (list[k]) vsum[list[k]] += line_v[list[k]];
      end
      foreach (list[k]) begin
        int m;
        real est, mean, mid;
        m = list[k];
        est  = real'(ones[m]) / OSR;
        mean = vsum[m] / OSR;
        mid  = window_mean(line_pin[m], t_start, $realtime);
        check(est - mean < 2.0 / OSR && mean - est < 2.0 / OSR,
              $sformatf("modulator %0d window %0d: %f vs mean %f", m, w, est, mean));
        check(est - mid < 0.01 && mid - est < 0.01,
              $sformatf("modulator %0d window %0d: %f vs sine average %f", m, w, est, mid));
        outputs++;
      end
    end
    // The last slot left Run-Test/Idle for Select-DR: load BYPASS from there.
    step0(1);
    step0(0);
    step0(0);
    for (int i = 0; i < IR_LEN; i++) step(i == IR_LEN - 1, OP_BYPASS[i], o);
    step0(1);
    step0(0);
  endtask

  initial begin
    for (int p = 0; p < NPINS; p++) pin_v[p] = sine(p, 0.0);
    #1 trst_n = 0;
    #2 trst_n = 1;
    step0(0);
    // four pins at once, pin p on line p
    session({4'b1000, 4'b0100, 4'b0010, 4'b0001}, 4'b1111, 10);
    // pin 3 alone, routed to line 0
    session({4'b0001, 4'b0000, 4'b0000, 4'b0000}, 4'b0001, 20);
    check(outputs == 4 * 10 + 20, "decimated outputs produced");
    $display("decimated outputs: %0d", outputs);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
