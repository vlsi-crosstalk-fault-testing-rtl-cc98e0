// Self-checking test of the scan-out register (N=4): serial shifting through
// the Cap chain, capture of the core outputs, and per-output error flags for
// one quiet output that changes during the oscillation phase.
module tb_bs_out_register;
  import xtalk_pkg::*;
  localparam int N = 4;
  logic clk = 1'b0, rst_n;
  out_ctrl_t ctrl;
  logic [N-1:0] from_core, out, err;
  logic scan_in, scan_out;
  int checks = 0, failures = 0;
  always #5 clk = ~clk;
  bs_out_register #(.N(N)) dut (.*);
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s (t=%0t)", what, $time); end
  endtask
  initial begin
    logic [15:0] sent;
    rst_n = 1'b0; ctrl = '0; ctrl.det_ck = 1; from_core = '0; scan_in = 0;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    // Normal mode pass-through.
    for (int k = 0; k < 5; k++) begin
      from_core = 4'($urandom);
      #1 check(out == from_core, "normal mode pass-through");
      @(negedge clk);
    end
    // Capture then shift out.
    from_core = 4'b1011;
    ctrl.cap_en = 1;
    @(negedge clk);
    ctrl.scan_out = 1;
    for (int k = N - 1; k >= 0; k--) begin
      check(scan_out == from_core[k], "captured bits shift out");
      @(negedge clk);
    end
    sent = 16'($urandom);
    for (int k = 0; k < 16; k++) begin
      scan_in = sent[k];
      @(negedge clk);
      if (k >= N) check(scan_out == sent[k - N + 1], "serial delay of N cells");
    end
    // Coupling test: outputs 0 and 1 follow Sq, 2 quiet, 3 glitches.
    ctrl = '0; ctrl.test_mode = 1; ctrl.ctm = 1; ctrl.det_ck = 1; ctrl.edr = 1;
    @(negedge clk);
    ctrl.edr = 0; ctrl.dmle = 1; ctrl.cap_en = 1; ctrl.upd_en = 1;
    from_core = 4'b0010;
    @(negedge clk);
    ctrl.cap_en = 0; ctrl.upd_en = 0;
    from_core = 4'b0001;
    @(negedge clk);
    ctrl.dmle = 0; ctrl.cap_en = 1; ctrl.upd_en = 1;
    for (int k = 0; k < 8; k++) begin
      from_core = k[0] ? 4'b1001 : 4'b0010;
      ctrl.det_ck = (k < 2);
      @(negedge clk);
    end
    ctrl.cap_en = 0; ctrl.upd_en = 0; ctrl.det_ck = 1;
    check(err == 4'b1000, $sformatf("error flags %b", err));
    check(out == 4'b1000, "pins show the flags");
    ctrl.edr = 1;
    @(negedge clk);
    check(err == 4'b0000, "EDR clears the flags");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
