// Self-checking test of the pulse detector: no pulse leaves the flag clear, a
// short pulse between clock edges sets it, the synchronised copy follows two
// cycles later, clr clears it; the P0 variant reacts to a 0 pulse only.
module tb_pulse_detector;
  logic clk = 1'b0, rst_n, vo, clr, detected, detected_sync;
  logic vo0, det0, det0_sync;
  int checks = 0, failures = 0;
  always #5 clk = ~clk;
  pulse_detector #(.POSITIVE(1'b1)) dut (.*);
  pulse_detector #(.POSITIVE(1'b0)) dut0 (.clk(clk), .rst_n(rst_n), .vo(vo0), .clr(clr),
                                          .detected(det0), .detected_sync(det0_sync));
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s (t=%0t)", what, $time); end
  endtask
  initial begin
    rst_n = 1'b1; vo = 0; vo0 = 1; clr = 0;
    #1 rst_n = 1'b0; clr = 1;
    repeat (2) @(negedge clk);
    rst_n = 1'b1; clr = 0;
    for (int r = 0; r < 4; r++) begin
      repeat (3) @(negedge clk);
      check(!detected && !detected_sync && !det0, "no pulse, no detection");
      #2 vo = 1; #1 vo = 0;
      check(detected, "pulse sets the flag at once");
      check(!det0, "P0 detector ignores a 1 pulse on another line");
      @(negedge clk);
      check(!detected_sync, "synchroniser latency");
      @(negedge clk);
      check(detected_sync, "synchronised flag after two clocks");
      #2 vo0 = 0; #1 vo0 = 1;
      check(det0, "P0 detector sees a 0 pulse");
      clr = 1; #1 clr = 0;
      check(!detected && !det0, "clear");
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
