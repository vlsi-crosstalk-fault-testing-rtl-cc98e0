// Self-checking test of the squarewave source: static low and high, an
// oscillation that starts at 0 and toggles every clock, and the external
// squarewave input.
module tb_sq_gen;
  import xtalk_pkg::*;
  logic clk = 1'b0, rst_n, use_ext, ext_sq, sq;
  sq_mode_e mode;
  int checks = 0, failures = 0;
  always #5 clk = ~clk;
  sq_gen dut (.*);
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s (t=%0t)", what, $time); end
  endtask
  initial begin
    rst_n = 1'b0; mode = SQ_LOW; use_ext = 0; ext_sq = 0;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    for (int r = 0; r < 3; r++) begin
      mode = SQ_LOW;  #1 check(sq == 1'b0, "static low");  @(negedge clk);
      mode = SQ_HIGH; #1 check(sq == 1'b1, "static high"); @(negedge clk);
      mode = SQ_OSC;
      for (int k = 0; k < 9; k++) begin
        #1 check(sq == k[0], $sformatf("oscillation cycle %0d", k));
        @(negedge clk);
      end
    end
    use_ext = 1'b1;
    for (int k = 0; k < 10; k++) begin
      ext_sq = 1'($urandom);
      #1 check(sq == ext_sq, "external squarewave");
      @(negedge clk);
    end
    mode = SQ_HIGH;
    #1 check(sq == 1'b1, "external input ignored outside oscillation");
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
