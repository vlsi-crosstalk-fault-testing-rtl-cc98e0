// Self-checking test of the scan-in register with two LFSR segments (M=8):
// seed after reset, reload from Update, 15 LFSR steps against a reference
// 1 + x + x^4 recurrence (and the period of 15), update onto the core inputs,
// loading and walking the single 1, the squarewave on the selected input only,
// pin pass-through and the serial output.
module tb_bs_in_register;
  import xtalk_pkg::*;

  localparam int M = 8;
  logic clk = 1'b0, rst_n;
  in_ctrl_t ctrl;
  logic [M-1:0] pins, to_core, cap;
  logic sq, scan_out;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  bs_in_register #(.M(M)) dut (.*);

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s (t=%0t)", what, $time); end
  endtask

  function automatic logic [3:0] step(input logic [3:0] s);
    return {s[2:0], s[3] ^ s[2]};
  endfunction

  task automatic pulse(input in_ctrl_t c);
    ctrl = c;
    @(negedge clk);
    ctrl.cap_en = 1'b0;
    ctrl.upd_en = 1'b0;
  endtask

  initial begin
    logic [3:0] s0, s1;
    logic [M-1:0] first;
    in_ctrl_t c;
    rst_n = 1'b0; ctrl = '0; pins = '0; sq = 1'b0;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    c = '0; c.test_mode = 1'b1;
    ctrl = c;
    #1 check(to_core == 8'h21, "seeds 1 and 2 in Update");
    // Reload Cap from Update.
    c.scan_reload = 1'b0; c.cap_en = 1'b1;
    pulse(c);
    check(cap == 8'h21, "reload Cap from Update");
    // LFSR steps.
    s0 = 4'h1; s1 = 4'h2;
    first = cap;
    c = '0; c.test_mode = 1'b1; c.scan_reload = 1'b1; c.lfsr_mode = 1'b1; c.cap_en = 1'b1;
    for (int k = 1; k <= 15; k++) begin
      pulse(c);
      s0 = step(s0); s1 = step(s1);
      check(cap == {s1, s0}, $sformatf("LFSR step %0d", k));
      if (k < 15) check(cap != first, "no early repeat");
    end
    check(cap == first, "period 15");
    pulse(c);
    s0 = step(s0); s1 = step(s1);
    // Update.
    c = '0; c.test_mode = 1'b1; c.upd_en = 1'b1;
    pulse(c);
    check(to_core == {s1, s0}, "pattern on the core inputs");
    // Load the walking one: M-1 zeros then a 1.
    c = '0; c.test_mode = 1'b1; c.scan_reload = 1'b1; c.cap_en = 1'b1;
    for (int k = 0; k < M; k++) begin
      c.scan_in = (k == M - 1);
      pulse(c);
    end
    check(cap == 8'h01, "single 1 in bit 0");
    c = '0; c.test_mode = 1'b1; c.ctm = 1'b1; c.scan_reload = 1'b1;
    for (int j = 0; j < M; j++) begin
      ctrl = c;
      for (int v = 0; v < 2; v++) begin
        logic [M-1:0] e;
        sq = v[0];
        #1;
        e = {s1, s0}; e[j] = sq;
        check(to_core == e, $sformatf("squarewave on input %0d only", j));
      end
      check(scan_out == cap[M-1], "serial output");
      c.cap_en = 1'b1; c.scan_in = 1'b0;
      pulse(c);
      c.cap_en = 1'b0;
      check(cap == 8'(1 << (j + 1)), "walking one moves up");
    end
    // Normal mode.
    c = '0;
    ctrl = c;
    for (int k = 0; k < 10; k++) begin
      pins = 8'($urandom);
      #1 check(to_core == pins, "pin pass-through");
      @(negedge clk);
    end
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
