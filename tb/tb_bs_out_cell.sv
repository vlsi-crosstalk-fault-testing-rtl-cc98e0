// Self-checking test of the modified boundary scan-out cell.
// Part 1 walks through the three phases for a sensitized output, a quiet
// output and a quiet output that catches a glitch, checking DM and G.
// Part 2 drives random controls and inputs and compares out, tnc and g each
// cycle with a reference model of the cell's registers and gates.
module tb_bs_out_cell;
  import xtalk_pkg::*;

  logic clk = 1'b0, rst_n;
  out_ctrl_t ctrl;
  logic fc, flc, out, tnc, g;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  bs_out_cell dut (.*);

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s (t=%0t)", what, $time); end
  endtask

  // One test: phase 1 reset, phase 2 with the output value for Sq=0 then
  // Sq=1, phase 3 with the given output sequence.
  task automatic one_test(input bit v0, input bit v1, input logic [7:0] seq,
                          input bit exp_dm, input bit exp_g, input string what);
    ctrl = '0; ctrl.test_mode = 1; ctrl.ctm = 1; ctrl.det_ck = 1;
    ctrl.edr = 1;
    @(negedge clk);
    ctrl.edr = 0;
    ctrl.dmle = 1; fc = v0; ctrl.cap_en = 1; ctrl.upd_en = 1;
    @(negedge clk);
    ctrl.cap_en = 0; ctrl.upd_en = 0; fc = v1;
    @(negedge clk);
    ctrl.dmle = 0;
    check(dut.d == exp_dm, {what, ": detection mode"});
    ctrl.cap_en = 1; ctrl.upd_en = 1;
    for (int k = 0; k < 8; k++) begin
      fc = seq[k];
      ctrl.det_ck = (k < 2);
      @(negedge clk);
    end
    ctrl.cap_en = 0; ctrl.upd_en = 0; ctrl.det_ck = 1;
    check(g == exp_g, {what, ": error flag"});
    check(out == exp_g, {what, ": cell output shows the flag"});
  endtask

  logic r_cap, r_upd, r_dm, r_g, a, c, e, f, exp_out;

  initial begin
    rst_n = 1'b0; ctrl = '0; fc = 0; flc = 0;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    one_test(0, 1, 8'b1010_1010, 1, 0, "sensitized output");
    one_test(1, 0, 8'b0101_0101, 1, 0, "inverting sensitized output");
    one_test(0, 0, 8'b0000_0000, 0, 0, "quiet output");
    one_test(1, 1, 8'b1111_1111, 0, 0, "quiet output at 1");
    one_test(0, 0, 8'b1010_1010, 0, 1, "glitches on quiet output");
    one_test(0, 0, 8'b0000_0100, 0, 1, "single captured glitch");
    one_test(0, 0, 8'b1111_1111, 0, 0, "change before the detection window");
    one_test(0, 1, 8'b1010_0010, 1, 1, "sensitized output stops toggling");

    // Random comparison with a reference model.
    rst_n = 1'b0;
    @(negedge clk);
    rst_n = 1'b1;
    r_cap = 0; r_upd = 0; r_dm = 0; r_g = 0;
    for (int k = 0; k < 3000; k++) begin
      ctrl = out_ctrl_t'($urandom);
      fc = 1'($urandom); flc = 1'($urandom);
      #1;
      a = ctrl.scan_out ? flc : fc;
      c = ctrl.dmle ? a : r_upd;
      e = c ^ r_cap;
      f = r_dm ^ e;
      exp_out = !ctrl.test_mode ? fc : (ctrl.ctm ? r_g : r_upd);
      check(out == exp_out, "output MUX");
      check(tnc == r_cap, "to next cell");
      check(g == r_g, "error detector");
      @(posedge clk);
      if (ctrl.dmle) r_dm = e;
      if (ctrl.edr) r_g = 1'b0; else if (f && !ctrl.det_ck) r_g = 1'b1;
      if (ctrl.upd_en) r_upd = r_cap;
      if (ctrl.cap_en) r_cap = a;
      @(negedge clk);
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
