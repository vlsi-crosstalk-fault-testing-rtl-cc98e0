// End-to-end test of the crosstalk BIST top at its default size.
//
// A small core model (xt_cut_model) sits between to_core and from_core. The
// test runs the BIST three times over all NUM_PATTERNS patterns: on a
// fault-free core, on a core with an aggressor/victim coupling, and on that
// core again with the squarewave taken from the external input. For every
// pattern the testbench rebuilds the pattern with its own 1 + x + x^4 LFSR,
// works out from the core's logic which outputs each input sensitizes and
// where an induced pulse on the victim becomes visible, and compares the
// expected error flags with err_flags when pattern_done pulses. It also checks
// the walking one and the pattern on to_core, the run length, ordinary
// boundary-scan shifting, normal-mode pass-through and the line pair with its
// pulse detector (one pulse that arrives, one that the line absorbs),
// and counts how often each mechanism happened.
module tb_xtalk_bist_top;
  import xtalk_pkg::*;

  localparam int M = 4, N = 4, NP = 15, OSC = 8;
  localparam int RUN_CYCLES = 1 + NP * (M + 3 + M * (OSC + 5));

  logic clk = 1'b0;
  logic rst_n;
  logic bist_start, bist_done, pattern_done, fault_found;
  phase_e bist_phase;
  logic [$clog2(M+1)-1:0]  bist_bit;
  logic [$clog2(NP+1)-1:0] bist_pattern;
  logic [N-1:0] err_flags;
  logic use_ext_sq, ext_sq;
  in_ctrl_t  ext_in_ctrl;
  out_ctrl_t ext_out_ctrl;
  logic tdi, tdo;
  logic [M-1:0] pins_in, to_core;
  logic [N-1:0] from_core, pins_out;
  logic line_ai, line_vi, line_ao, line_vo, pd_clear, pd_detected_raw, pd_detected;
  logic fault_en;

  int checks = 0, failures = 0;
  int n_lfsr = 0, n_walk = 0, n_sens = 0, n_detect = 0, n_clean = 0;
  int n_shift = 0, n_normal = 0, n_ext = 0, n_pulse = 0, n_absorb = 0, n_phase1 = 0;

  always #5 clk = ~clk;

  xtalk_bist_top u_top (.*);

  xt_cut_model u_cut (
    .clk     (clk),
    .fault_en(fault_en),
    .in      (to_core),
    .out     (from_core)
  );

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s (t=%0t)", what, $time);
    end
  endtask

  // Reference core logic, yflip inverts the victim line.
  function automatic logic [3:0] core_ref(input logic [3:0] p, input bit yflip);
    logic x, y;
    x = p[0] ^ p[1];
    y = (p[2] & p[3]) ^ yflip;
    return {p[0] & p[2], p[2] & ~y, y, x};
  endfunction

  function automatic logic [3:0] lfsr_step(input logic [3:0] s);
    return {s[2:0], s[3] ^ s[2]};
  endfunction

  // Expected error flags of one pattern.
  function automatic logic [3:0] expected_err(input logic [3:0] p, input bit faulty,
                                              output int nsens);
    logic [3:0] e, s, vis;
    logic [3:0] p0, p1;
    e = '0;
    nsens = 0;
    for (int j = 0; j < M; j++) begin
      p0 = p; p0[j] = 1'b0;
      p1 = p; p1[j] = 1'b1;
      s  = core_ref(p0, 1'b0) ^ core_ref(p1, 1'b0);
      if (s != 0) nsens++;
      if (faulty && ((p0[0] ^ p0[1]) != (p1[0] ^ p1[1]))) begin
        vis = core_ref(p0, 1'b0) ^ core_ref(p0, 1'b1);
        e |= vis & ~s;
      end
    end
    return e;
  endfunction

  // Pattern and walking-one monitor.
  logic [3:0] ref_state;
  logic [3:0] last_bit;
  always @(negedge clk) begin
    if (rst_n && bist_phase == PH_SELECT) begin
      logic [3:0] exp_core;
      exp_core = ref_state;
      exp_core[bist_bit[1:0]] = u_top.sq;
      check(to_core == exp_core, "pattern and squarewave on core inputs");
      check(u_top.in_cap == 4'(1 << bist_bit), "walking one selects the input under test");
      if (last_bit != 4'(bist_bit)) n_walk++;
      last_bit <= 4'(bist_bit);
    end
    if (rst_n && bist_phase == PH_PATTERN && u_top.in_ctrl.lfsr_mode) n_lfsr++;
    if (rst_n && bist_phase == PH_PATTERN && u_top.in_ctrl.lfsr_mode) n_phase1++;
  end

  task automatic run_bist(input bit faulty, input bit ext);
    int cycles;
    int nsens;
    logic [3:0] exp_e;
    bit any;
    fault_en   = faulty;
    use_ext_sq = ext;
    ref_state  = 4'b0001;
    ref_state  = lfsr_step(ref_state);
    any        = 1'b0;
    last_bit   = 4'hf;
    bist_start = 1'b1;
    cycles     = 0;
    while (!bist_done) begin
      @(negedge clk);
      cycles++;
      if (pattern_done) begin
        exp_e = expected_err(ref_state, faulty, nsens);
        n_sens += nsens;
        check(err_flags == exp_e, $sformatf("error flags %b, expected %b, pattern %b",
                                             err_flags, exp_e, ref_state));
        check(pins_out == err_flags, "output pins show the error flags");
        if (err_flags != 0) n_detect++;
        else n_clean++;
        any |= (exp_e != 0);
        ref_state = lfsr_step(ref_state);
      end
      if (cycles > 2 * RUN_CYCLES) break;
    end
    check(cycles == RUN_CYCLES, $sformatf("run length %0d, expected %0d", cycles, RUN_CYCLES));
    check(bist_pattern == ($bits(bist_pattern))'(NP), "pattern count");
    @(negedge clk);
    check(fault_found == any, "fault_found summary");
    if (ext) n_ext++;
    bist_start = 1'b0;
    @(negedge clk);
    check(bist_phase == PH_IDLE && !bist_done, "back to idle");
  endtask

  // Victim pulse of width w (ns) with the aggressor falling at its rising
  // edge, then a return of the aggressor to 1 and a wait of 3 clocks.
  task automatic line_pulse(input realtime w);
    line_ai = 1'b1;
    #2;
    line_vi = 1'b1;
    line_ai = 1'b0;
    #(w);
    line_vi = 1'b0;
    #2;
    line_ai = 1'b1;
    repeat (3) @(negedge clk);
  endtask

  // External squarewave: toggles at every clock.
  always @(posedge clk) ext_sq <= ~ext_sq;

  initial begin
    logic [15:0] sent;
    rst_n        = 1'b1;
    pd_clear     = 1'b0;
    #1;
    rst_n        = 1'b0;
    bist_start   = 1'b0;
    use_ext_sq   = 1'b0;
    ext_sq       = 1'b0;
    ext_in_ctrl  = '0;
    ext_out_ctrl = '0;
    ext_out_ctrl.det_ck = 1'b1;
    tdi          = 1'b0;
    pins_in      = '0;
    line_ai      = 1'b1;
    line_vi      = 1'b0;
    pd_clear     = 1'b1;
    fault_en     = 1'b0;
    repeat (3) @(negedge clk);
    rst_n    = 1'b1;
    pd_clear = 1'b0;

    // Normal mode: pins pass straight through.
    for (int k = 0; k < 8; k++) begin
      pins_in = 4'($urandom);
      @(negedge clk);
      check(to_core == pins_in, "normal mode: core inputs from pins");
      check(pins_out == from_core, "normal mode: pins from core outputs");
      n_normal++;
    end

    // Boundary-scan shift through the M + N cells.
    ext_in_ctrl.cap_en      = 1'b1;
    ext_in_ctrl.scan_reload = 1'b1;
    ext_out_ctrl.cap_en     = 1'b1;
    ext_out_ctrl.scan_out   = 1'b1;
    sent = 16'($urandom);
    for (int k = 0; k < 16; k++) begin
      tdi = sent[k];
      @(negedge clk);
      if (k >= M + N) begin
        check(tdo == sent[k - (M + N) + 1], "scan path delay of M+N cells");
        n_shift++;
      end
    end
    ext_in_ctrl  = '0;
    ext_out_ctrl = '0;
    ext_out_ctrl.det_ck = 1'b1;

    // BIST runs.
    run_bist(1'b0, 1'b0);
    run_bist(1'b1, 1'b0);
    run_bist(1'b1, 1'b1);

    // Line pair and pulse detector. With no coupling the critical width is
    // 161 ps: a 170 ps victim pulse with the aggressor falling at the same
    // time arrives, a 150 ps one is absorbed.
    @(negedge clk);
    check(!pd_detected, "pulse detector clear");
    line_pulse(0.170);
    check(pd_detected && pd_detected_raw, "wide pulse arrived and was detected");
    check(line_ao == line_ai, "aggressor far end follows its near end");
    if (pd_detected) n_pulse++;
    pd_clear = 1'b1;
    @(negedge clk);
    pd_clear = 1'b0;
    repeat (3) @(negedge clk);
    check(!pd_detected, "pulse detector cleared");
    line_pulse(0.150);
    check(!pd_detected && !pd_detected_raw, "narrow pulse absorbed by the line");
    if (!pd_detected) n_absorb++;

    // Every mechanism must have happened.
    check(n_phase1 > 0, "LFSR pattern generation happened");
    check(n_walk   > 0, "walking one moved");
    check(n_sens   > 0, "sensitized outputs found");
    check(n_detect > 0, "crosstalk glitch detected");
    check(n_clean  > 0, "clean pattern seen");
    check(n_shift  > 0, "boundary-scan shift");
    check(n_normal > 0, "normal mode");
    check(n_ext    > 0, "external squarewave");
    check(n_pulse  > 0, "pulse detection");
    check(n_absorb > 0, "pulse absorbed");
    $display("mechanisms: lfsr=%0d walk=%0d sensitized=%0d detect=%0d clean=%0d shift=%0d normal=%0d ext=%0d pulse=%0d absorbed=%0d",
             n_lfsr, n_walk, n_sens, n_detect, n_clean, n_shift, n_normal, n_ext, n_pulse, n_absorb);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
