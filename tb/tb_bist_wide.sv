// BIST at a benchmark-sized width: M = 180 inputs and N = 180 outputs, the
// input count of a 178-input core rounded up to whole LFSR segments. The core
// is 45 copies of the small core model, copy c on inputs and outputs
// 4c..4c+3; a random subset of the copies has its aggressor/victim coupling
// enabled. For every pattern the testbench predicts the error flags of each
// copy from its own 45-segment LFSR model and the copies' logic, compares them
// with err_flags, and at the end reports the fraction of injected couplings
// that were detected (the fault coverage) and checks it against the
// prediction.
module tb_bist_wide;
  import xtalk_pkg::*;

  localparam int M = 180, N = 180, NP = 30, OSC = 8, NC = M / 4;
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
  logic [NC-1:0] fault_en;

  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  xtalk_bist_top #(.M(M), .N(N), .NUM_PATTERNS(NP), .OSC_CYCLES(OSC)) u_top (.*);

  for (genvar c = 0; c < NC; c++) begin : g_core
    xt_cut_model u_cut (
      .clk     (clk),
      .fault_en(fault_en[c]),
      .in      (to_core[4*c +: 4]),
      .out     (from_core[4*c +: 4])
    );
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s (t=%0t)", what, $time);
    end
  endtask

  function automatic logic [3:0] core_ref(input logic [3:0] p, input bit yflip);
    logic x, y;
    x = p[0] ^ p[1];
    y = (p[2] & p[3]) ^ yflip;
    return {p[0] & p[2], p[2] & ~y, y, x};
  endfunction

  function automatic logic [3:0] lfsr_step(input logic [3:0] s);
    return {s[2:0], s[3] ^ s[2]};
  endfunction

  function automatic logic [3:0] expected_err(input logic [3:0] p, input bit faulty);
    logic [3:0] e, s, p0, p1;
    e = '0;
    for (int j = 0; j < 4; j++) begin
      p0 = p; p0[j] = 1'b0;
      p1 = p; p1[j] = 1'b1;
      s  = core_ref(p0, 1'b0) ^ core_ref(p1, 1'b0);
      if (faulty && ((p0[0] ^ p0[1]) != (p1[0] ^ p1[1])))
        e |= (core_ref(p0, 1'b0) ^ core_ref(p0, 1'b1)) & ~s;
    end
    return e;
  endfunction

  initial begin
    logic [3:0] seg [NC];
    logic [N-1:0] exp_e;
    logic [NC-1:0] seen, exp_seen;
    int cycles, n_inj, n_det, n_exp;
    rst_n = 1'b1; pd_clear = 1'b0;
    #1;
    rst_n = 1'b0; bist_start = 1'b0; use_ext_sq = 1'b0; ext_sq = 1'b0;
    ext_in_ctrl = '0; ext_out_ctrl = '0; ext_out_ctrl.det_ck = 1'b1;
    tdi = 1'b0; pins_in = '0; line_ai = 1'b0; line_vi = 1'b0; pd_clear = 1'b1;
    for (int c = 0; c < NC; c++) fault_en[c] = ($urandom % 3) == 0;
    for (int c = 0; c < NC; c++) seg[c] = 4'((c % 15) + 1);
    repeat (3) @(negedge clk);
    rst_n = 1'b1; pd_clear = 1'b0;
    seen = '0; exp_seen = '0;
    for (int c = 0; c < NC; c++) seg[c] = lfsr_step(seg[c]);
    bist_start = 1'b1;
    cycles = 0;
    while (!bist_done && cycles <= 2 * RUN_CYCLES) begin
      @(negedge clk);
      cycles++;
      if (pattern_done) begin
        for (int c = 0; c < NC; c++) begin
          exp_e[4*c +: 4] = expected_err(seg[c], fault_en[c]);
          if (err_flags[4*c +: 4] != 0) seen[c] = 1'b1;
          if (exp_e[4*c +: 4] != 0) exp_seen[c] = 1'b1;
          seg[c] = lfsr_step(seg[c]);
        end
        check(err_flags == exp_e, $sformatf("error flags of pattern %0d", bist_pattern));
      end
    end
    check(cycles == RUN_CYCLES, $sformatf("run length %0d, expected %0d", cycles, RUN_CYCLES));
    n_inj = 0; n_det = 0; n_exp = 0;
    for (int c = 0; c < NC; c++) begin
      if (fault_en[c]) n_inj++;
      if (fault_en[c] && seen[c]) n_det++;
      if (fault_en[c] && exp_seen[c]) n_exp++;
      check(!(seen[c] && !fault_en[c]), "no flag on a fault-free copy");
    end
    check(n_det == n_exp, "detected couplings as predicted");
    check(n_inj > 0 && n_det > 0, "couplings injected and detected");
    check(fault_found == (n_det > 0), "fault_found");
    $display("couplings injected %0d, detected %0d (coverage %0d%%) in %0d patterns, %0d cycles",
             n_inj, n_det, (n_inj > 0) ? 100 * n_det / n_inj : 0, NP, cycles);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3 * RUN_CYCLES) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
