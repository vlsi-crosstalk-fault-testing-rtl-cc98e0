// Self-checking test of the modified boundary scan-in cell: random control,
// pin, serial and squarewave inputs for many cycles, compared each cycle with
// the two multiplexer truth tables and a reference copy of Cap and Update.
module tb_bs_in_cell;
  import xtalk_pkg::*;

  logic clk = 1'b0, rst_n;
  in_ctrl_t ctrl;
  logic pin, ser_in, sq, to_core, cap_q;
  logic ref_cap, ref_upd, exp_core;
  int checks = 0, failures = 0;
  int n_sq = 0, n_pin = 0, n_upd = 0;

  always #5 clk = ~clk;

  bs_in_cell #(.SEED(1'b1)) dut (.*);

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s (t=%0t)", what, $time); end
  endtask

  initial begin
    rst_n = 1'b0; ctrl = '0; pin = 0; ser_in = 0; sq = 0;
    ref_cap = 1'b0; ref_upd = 1'b1;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    ctrl.test_mode = 1'b1;
    #1 check(to_core == 1'b1, "Update resets to the seed bit");
    for (int k = 0; k < 2000; k++) begin
      @(negedge clk);
      ctrl   = in_ctrl_t'($urandom);
      pin    = 1'($urandom);
      ser_in = 1'($urandom);
      sq     = 1'($urandom);
      #1;
      // 3-to-1 MUX truth table: 0xx pin, 10x / 110 Update, 111 Sq.
      if (!ctrl.test_mode)            begin exp_core = pin;     n_pin++; end
      else if (ref_cap && ctrl.ctm)   begin exp_core = sq;      n_sq++;  end
      else                            begin exp_core = ref_upd; n_upd++; end
      check(to_core == exp_core, "3-to-1 MUX");
      check(cap_q == ref_cap, "Cap");
      @(posedge clk);
      if (ctrl.upd_en) ref_upd = ref_cap;
      if (ctrl.cap_en) ref_cap = ctrl.scan_reload ? ser_in : exp_core;
    end
    check(n_sq > 0 && n_pin > 0 && n_upd > 0, "all MUX inputs used");
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
