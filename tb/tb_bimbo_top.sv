// End-to-end testbench of the BIMBO component at its default size.
//
// The testbench plays the external test controller: it drives the TAP pins,
// follows the access protocol (SAMPLE/PRELOAD the SBx words, load CHNSEL,
// load the BIMBO instruction, idle in Run-Test/Idle) and collects the
// interleaved bits from TDO. It de-interleaves them per modulator and
// compares every bit with reference first-order loops computed here from the
// pin voltages and the SBx routing, and it decimates each stream by counting
// ones over the observation window, as the controller's filters would, to
// check the measured voltage.
//
// It exercises: the 01 instruction capture, BYPASS (one TCK of delay),
// read-back of CHNSEL and of the ABM words, interleaving of four, two, one and
// no modulators (mode switches through CHNSEL), a non-identity pin-to-line
// routing, two pins shorted onto one line, an undriven line, a DR scan with a
// pause, and a reset by five TMS ones. Each frame must last N TCK cycles with
// N enabled modulators (one common sample per frame, counted at the bank's
// sampling strobe). Every mechanism must occur at least once.
module tb_bimbo_top;
  import bimbo_pkg::*;
  localparam int NPINS = 4, NMOD = 4;
  localparam real VP = 1.0, VN = 0.0;

  logic tck = 0, trst_n = 1, tms = 1, tdi = 0;
  logic tdo, tdo_en;
  real pin_v [NPINS];
  real line_v [NMOD];
  logic [NMOD-1:0] line_driven;

  bimbo_top dut (.*);

  int checks = 0, failures = 0;
  int n_ir_capture = 0, n_bypass = 0, n_chnsel_rb = 0, n_abm_rb = 0;
  int n_obs[NMOD+1] = '{default: 0};   // observation sessions per count of enabled
  int n_shorted = 0, n_undriven = 0, n_pause = 0, n_tms_reset = 0, n_routed = 0;

  always #5 tck = ~tck;

  // watchdog
  int cycles = 0;
  always @(posedge tck) begin
    cycles++;
    if (cycles > 200000) begin
      failures++;
      $display("FAIL watchdog");
      $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
      $finish;
    end
  end

  int samples_seen = 0;
  always @(posedge tck) if (dut.u_core.sample_en) samples_seen++;

  task automatic check(bit cond, string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL %s", what); end
  endtask

  // One TCK cycle: TMS/TDI change after the falling edge, TDO is read at the
  // rising edge that ends the cycle.
  task automatic step(logic m, logic d, output logic o, output logic oe);
    @(negedge tck);
    tms = m; tdi = d;
    @(posedge tck);
    o = tdo; oe = tdo_en;
  endtask

  task automatic step0(logic m);
    logic o, oe;
    step(m, 0, o, oe);
  endtask

  // From Run-Test/Idle, scan n bits (LSB first) into IR or DR, back to RTI.
  task automatic scan(bit is_ir, int n, logic [63:0] din, output logic [63:0] dout,
                      input bit with_pause = 0);
    logic o, oe;
    dout = '0;
    step0(1);                 // Select-DR
    if (is_ir) step0(1);      // Select-IR
    step0(0);                 // Capture
    step0(0);                 // Shift
    for (int i = 0; i < n; i++) begin
      bit pause_here;
      pause_here = with_pause && (i == n / 2 - 1) && (i != n - 1);
      step((i == n - 1) || pause_here, din[i], o, oe);
      dout[i] = o;
      check(oe, "TDO enabled while shifting");
      if (pause_here) begin
        step0(0); step0(0); step0(1); step0(0);   // Pause, Pause, Exit2, Shift
        n_pause++;
      end
    end
    step0(1);                 // Update
    step0(0);                 // Run-Test/Idle
  endtask

  task automatic load_ir(ir_t op);
    logic [63:0] o;
    scan(1, IR_LEN, 64'(op), o);
    check(o[1:0] == 2'b01, "IR captures ...01");
    n_ir_capture++;
  endtask

  // Reference modulator loops.
  real  acc [NMOD];
  real  exp_line [NMOD];
  logic [NPINS-1:0][NMOD-1:0] cfg_sbx;
  logic [NMOD-1:0] cfg_chnsel;

  task automatic configure(logic [NPINS-1:0][NMOD-1:0] sbxw, logic [NMOD-1:0] chw,
                           bit pause = 0);
    logic [63:0] o;
    load_ir(OP_SAMPLE_PRELOAD);
    scan(0, NPINS * NMOD, 64'(sbxw), o, pause);
    check(o[NPINS*NMOD-1:0] == cfg_sbx, "ABM words read back");
    n_abm_rb++;
    load_ir(OP_CHNSEL);
    scan(0, NMOD, 64'(chw), o);
    check(o[NMOD-1:0] == cfg_chnsel, "CHNSEL read back");
    n_chnsel_rb++;
    cfg_sbx = sbxw; cfg_chnsel = chw;
    // expected line voltages
    for (int x = 0; x < NMOD; x++) begin
      real s; int n;
      s = 0.0; n = 0;
      for (int p = 0; p < NPINS; p++) if (sbxw[p][x]) begin s += pin_v[p]; n++; end
      exp_line[x] = (n == 0) ? 0.0 : s / n;
      if (n > 1) n_shorted++;
      if (n == 0 && chw[x]) n_undriven++;
    end
    for (int p = 0; p < NPINS; p++) if (sbxw[p] != 0 && sbxw[p] != (1 << p)) n_routed++;
  endtask

  // Observe for `frames` frames, leaving Run-Test/Idle at the frame end.
  task automatic observe(int frames);
    int list[$];
    int n, ones[NMOD], s0;
    logic o, oe;
    list = {};
    for (int i = 0; i < NMOD; i++) if (cfg_chnsel[i]) list.push_back(i);
    n = list.size();
    ones = '{default: 0};
    load_ir(OP_BIMBO);          // ends in Run-Test/Idle
    s0 = samples_seen;
    #1;
    for (int x = 0; x < NMOD; x++)
      check(line_v[x] < exp_line[x] + 1e-9 && line_v[x] > exp_line[x] - 1e-9,
            $sformatf("bus line %0d voltage %f from SBx routing, expected %f sbx=%h", x, line_v[x], exp_line[x], dut.sbx));
    if (n == 0) begin
      for (int c = 0; c < 4 * frames; c++) begin
        step(c == 4 * frames - 1, 0, o, oe);
        check(o == 0, "TDO idle with no modulator enabled");
      end
      check(samples_seen == s0, "no sampling with no modulator enabled");
    end else begin
      for (int f = 0; f < frames; f++) begin
        for (int k = 0; k < n; k++) begin
          int m;
          m = list[k];
          step((f == frames - 1) && (k == n - 1), 0, o, oe);
          check(oe, "TDO enabled while observing");
          check(o == (acc[m] >= 0.0), $sformatf("interleaved bit matches reference loop f=%0d k=%0d m=%0d reference integrator=%g", f, k, m, acc[m]));
          ones[m] += int'(o);
        end
        for (int m = 0; m < NMOD; m++)
          acc[m] = acc[m] + (exp_line[m] - ((acc[m] >= 0.0) ? VP : VN));
      end
      #1 check(samples_seen - s0 == frames, $sformatf("one sample per frame of N TCK cycles: %0d samples in %0d frames", samples_seen - s0, frames));
      foreach (list[k]) begin
        real est, err;
        est = VN + (VP - VN) * real'(ones[list[k]]) / real'(frames);
        err = est - exp_line[list[k]];
        check(err < 2.0 / frames && err > -2.0 / frames, "decimated voltage");
      end
    end
    n_obs[n]++;
    // Leave BIMBO without another Run-Test/Idle cycle under it: go from
    // Select-DR straight into an IR scan that loads BYPASS.
    step0(1);    // Select-IR
    step0(0);    // Capture-IR
    step0(0);    // Shift-IR
    for (int i = 0; i < IR_LEN; i++) step(i == IR_LEN - 1, OP_BYPASS[i], o, oe);
    step0(1);    // Update-IR
    step0(0);    // Run-Test/Idle
  endtask

  initial begin
    logic [63:0] o;
    pin_v = '{0.2, 0.45, 0.7, 0.9};
    cfg_sbx = '0; cfg_chnsel = '0;
    foreach (acc[m]) acc[m] = 0.0;
    #1 trst_n = 0;
    #2 trst_n = 1;
    step0(0);                                   // Run-Test/Idle

    // BYPASS: one cycle of delay, captured 0 first
    load_ir(OP_BYPASS);
    scan(0, 16, 64'h0000_0000_0000_B5A3, o);
    check(o[15:0] == 16'h6B46, "BYPASS delays by one TCK");
    n_bypass++;

    // identity routing, all four modulators
    configure({4'b1000, 4'b0100, 4'b0010, 4'b0001}, 4'b1111);
    observe(400);
    // two modulators, reversed routing, scan with a pause
    configure({4'b0001, 4'b0010, 4'b0100, 4'b1000}, 4'b0101, 1);
    observe(300);
    // one modulator, two pins shorted on line 3
    configure({4'b1000, 4'b0000, 4'b1000, 4'b0000}, 4'b1000);
    observe(500);
    // an enabled line with no pin on it, and line 1 fed from pin 1
    configure({4'b0000, 4'b0000, 4'b0010, 4'b0000}, 4'b0011);
    observe(200);
    // nothing enabled
    configure({4'b0000, 4'b0000, 4'b0000, 4'b0001}, 4'b0000);
    observe(20);

    // new pin voltages, all four again
    pin_v = '{0.95, 0.05, 0.5, 0.33};
    configure({4'b0001, 4'b1000, 4'b0100, 4'b0010}, 4'b1111);
    observe(300);

    // five TMS ones reset CHNSEL and the instruction
    repeat (5) step0(1);
    check(dut.u_core.state == TEST_LOGIC_RESET, "five ones reach Test-Logic-Reset");
    step0(0);
    n_tms_reset++;
    cfg_chnsel = '0; cfg_sbx = '0;
    load_ir(OP_CHNSEL);
    scan(0, NMOD, 64'h0, o);
    check(o[NMOD-1:0] == 0, "CHNSEL cleared by reset");

    // every mechanism must have happened
    check(n_ir_capture > 0, "mechanism: IR capture");
    check(n_bypass > 0, "mechanism: bypass");
    check(n_chnsel_rb > 0, "mechanism: CHNSEL scan");
    check(n_abm_rb > 0, "mechanism: SAMPLE/PRELOAD of ABM words");
    for (int i = 0; i <= NMOD; i++)
      if (i != 3) check(n_obs[i] > 0, $sformatf("mechanism: observe %0d modulators", i));
    check(n_routed > 0, "mechanism: non-identity routing");
    check(n_shorted > 0, "mechanism: pins shorted on a line");
    check(n_undriven > 0, "mechanism: undriven line");
    check(n_pause > 0, "mechanism: paused scan");
    check(n_tms_reset > 0, "mechanism: TMS reset");
    $display("mechanisms: ir_capture=%0d bypass=%0d chnsel=%0d abm=%0d obs0=%0d obs1=%0d obs2=%0d obs4=%0d routed=%0d shorted=%0d undriven=%0d pause=%0d tms_reset=%0d",
             n_ir_capture, n_bypass, n_chnsel_rb, n_abm_rb, n_obs[0], n_obs[1], n_obs[2],
             n_obs[4], n_routed, n_shorted, n_undriven, n_pause, n_tms_reset);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
