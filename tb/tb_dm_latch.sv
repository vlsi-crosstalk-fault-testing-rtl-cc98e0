// Self-checking test of the detection mode latch: random enable and data,
// the output must follow the data loaded while the enable is high and hold it
// while the enable is low.
module tb_dm_latch;
  logic clk = 1'b0, rst_n, le, d, q, r;
  int checks = 0, failures = 0, holds = 0;
  always #5 clk = ~clk;
  dm_latch dut (.*);
  initial begin
    rst_n = 1'b0; le = 0; d = 0; r = 0;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    for (int k = 0; k < 1000; k++) begin
      le = 1'($urandom); d = 1'($urandom);
      @(negedge clk);
      if (le) r = d; else holds++;
      checks++;
      if (q != r) begin failures++; $display("FAIL: q=%b expected %b", q, r); end
    end
    checks++;
    if (holds == 0) failures++;
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
