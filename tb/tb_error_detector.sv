// Self-checking test of the error detector: G must become 1 only after F was
// 1 while Det_ck was 0, stay 1, and return to 0 on EDR. Checked with random
// stimulus against G = (G | (F & ~Det_ck)) & ~EDR, evaluated per clock.
module tb_error_detector;
  logic clk = 1'b0, rst_n, f, det_ck, edr, g, r;
  int checks = 0, failures = 0, sets = 0, masked = 0;
  always #5 clk = ~clk;
  error_detector dut (.*);
  initial begin
    rst_n = 1'b0; f = 0; det_ck = 1; edr = 0; r = 0;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    for (int k = 0; k < 2000; k++) begin
      f = 1'($urandom); det_ck = 1'($urandom); edr = ($urandom % 16) == 0;
      @(negedge clk);
      if (!r && f && !det_ck && !edr) sets++;
      if (f && det_ck) masked++;
      r = (r | (f & ~det_ck)) & ~edr;
      checks++;
      if (g != r) begin failures++; $display("FAIL: g=%b expected %b", g, r); end
    end
    checks++;
    if (sets == 0 || masked == 0) failures++;
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
