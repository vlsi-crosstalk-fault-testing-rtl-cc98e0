// Self-checking test of the BIST phase controller (M=4, 3 patterns,
// OSC_CYCLES=5). It counts, over a whole run, the cycles of each control
// signal and compares them with the counts that the phase sequence implies:
// run length, pattern_done pulses, EDR (phase 1 only), LFSR steps, the single
// 1 shifted in per pattern, DMLE, Det_ck low, Sq modes, and the phase order.
// It also checks that external controls pass through while idle.
module tb_bist_controller;
  import xtalk_pkg::*;
  localparam int M = 4, NP = 3, OSC = 5;
  localparam int PER_BIT = 4 + OSC + 1;
  localparam int PER_PAT = 3 + M + M * PER_BIT;

  logic clk = 1'b0, rst_n, start, pattern_done, done;
  in_ctrl_t ext_in_ctrl, in_ctrl;
  out_ctrl_t ext_out_ctrl, out_ctrl;
  sq_mode_e sq_mode;
  phase_e phase, last_phase;
  logic [$clog2(M+1)-1:0] bit_idx;
  logic [$clog2(NP+1)-1:0] pat_idx;
  int checks = 0, failures = 0;
  int cyc, n_pd, n_edr, n_lfsr, n_one, n_dmle, n_det, n_osc, n_high, n_incap, n_upd_out;
  int n_trans_bad;

  always #5 clk = ~clk;

  bist_controller #(.M(M), .NUM_PATTERNS(NP), .OSC_CYCLES(OSC)) dut (.*);

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s (t=%0t)", what, $time); end
  endtask

  initial begin
    rst_n = 1'b0; start = 0; ext_in_ctrl = '0; ext_out_ctrl = '0;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    for (int k = 0; k < 5; k++) begin
      ext_in_ctrl = in_ctrl_t'($urandom); ext_out_ctrl = out_ctrl_t'($urandom);
      #1 check(in_ctrl == ext_in_ctrl && out_ctrl == ext_out_ctrl, "idle pass-through");
      check(phase == PH_IDLE && !done, "idle");
      @(negedge clk);
    end
    for (int run = 0; run < 2; run++) begin
      cyc = 0; n_pd = 0; n_edr = 0; n_lfsr = 0; n_one = 0; n_dmle = 0; n_det = 0;
      n_osc = 0; n_high = 0; n_incap = 0; n_upd_out = 0; n_trans_bad = 0;
      last_phase = PH_IDLE;
      start = 1;
      @(negedge clk);
      while (!done && cyc < 10 * NP * PER_PAT) begin
        cyc++;
        if (pattern_done) n_pd++;
        if (out_ctrl.edr) begin
          n_edr++;
          if (phase != PH_PATTERN) n_trans_bad++;
        end
        if (in_ctrl.lfsr_mode && in_ctrl.cap_en) n_lfsr++;
        if (in_ctrl.scan_in && in_ctrl.cap_en) n_one++;
        if (in_ctrl.cap_en) n_incap++;
        if (out_ctrl.dmle) n_dmle++;
        if (!out_ctrl.det_ck) begin
          n_det++;
          if (phase != PH_OSC) n_trans_bad++;
        end
        if (out_ctrl.upd_en) n_upd_out++;
        if (sq_mode == SQ_OSC) n_osc++;
        if (sq_mode == SQ_HIGH) n_high++;
        // allowed phase changes: 1->2, 2->3, 3->2, 3->1
        if (phase != last_phase &&
            !((last_phase == PH_IDLE && phase == PH_PATTERN) ||
              (last_phase == PH_PATTERN && phase == PH_SELECT) ||
              (last_phase == PH_SELECT && phase == PH_OSC) ||
              (last_phase == PH_OSC && (phase == PH_SELECT || phase == PH_PATTERN))))
          n_trans_bad++;
        last_phase = phase;
        @(negedge clk);
      end
      check(done, "done");
      check(cyc == NP * PER_PAT, $sformatf("run length %0d expected %0d", cyc, NP * PER_PAT));
      check(n_pd == NP, "one pattern_done per pattern");
      check(n_edr == NP * (3 + M), "EDR only in phase 1");
      check(n_lfsr == NP, "one LFSR step per pattern");
      check(n_one == NP, "one 1 shifted in per pattern");
      check(n_incap == NP * (2 + M + M), "scan-in capture pulses");
      check(n_dmle == NP * M * 4, "DMLE cycles");
      check(n_det == NP * M * (OSC - 2), "Det_ck low cycles");
      check(n_upd_out == NP * M * (1 + OSC), "scan-out update pulses");
      check(n_osc == NP * M * OSC, "oscillation cycles");
      check(n_high == NP * M * 2, "Sq high cycles in phase 2");
      check(n_trans_bad == 0, "phase order and signal placement");
      check(pat_idx == ($bits(pat_idx))'(NP), "pattern count");
      start = 0;
      @(negedge clk);
      check(!done && phase == PH_IDLE, "back to idle");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
