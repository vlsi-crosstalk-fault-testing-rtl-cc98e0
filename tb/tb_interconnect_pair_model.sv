// Self-checking test of the interconnect pair model together with the pulse
// detector, following the critical-width-pulse test: for a 45 fF coupling the
// critical width with a coincident falling aggressor is 161 + 1.48 * 45 =
// 227.6 ps, without the aggressor 161 ps. Pulses just under and over each
// width are applied and the detector result is compared; a fault-free pair
// passes the narrower pulse in both cases. The output delay of 284 ps is
// checked too.
module tb_interconnect_pair_model;
  timeunit 1ps;
  timeprecision 1ps;

  logic clk = 1'b0, rst_n, clr;
  logic ai, vi, ao, vo, det, det_s;
  logic vi2, vo2, ao2, det2, det2_s;
  int checks = 0, failures = 0;
  realtime t_in, t_out;

  always #5000 clk = ~clk;

  interconnect_pair_model #(.CF_FF(45.0)) u_faulty (.ai(ai), .vi(vi), .ao(ao), .vo(vo));
  interconnect_pair_model #(.CF_FF(0.0))  u_good   (.ai(ai), .vi(vi2), .ao(ao2), .vo(vo2));
  pulse_detector u_pd  (.clk(clk), .rst_n(rst_n), .vo(vo),  .clr(clr), .detected(det),  .detected_sync(det_s));
  pulse_detector u_pd2 (.clk(clk), .rst_n(rst_n), .vo(vo2), .clr(clr), .detected(det2), .detected_sync(det2_s));

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s (t=%0t)", what, $time); end
  endtask

  // Apply one CWP of width w ps, with or without a coincident falling
  // aggressor, and return the two detector results.
  task automatic cwp(input real w, input bit with_agg, output bit d_faulty, output bit d_good);
    clr = 0; #1 clr = 1; #100 clr = 0;
    ai = with_agg ? 1'b1 : 1'b0;
    #1000;
    fork
      begin vi = 1; vi2 = 1; #(w) vi = 0; vi2 = 0; end
      begin if (with_agg) ai = 0; end
    join
    #1000;
    d_faulty = det;
    d_good   = det2;
  endtask

  always @(posedge vi) t_in = $realtime;
  always @(posedge vo) t_out = $realtime;

  initial begin
    bit df, dg;
    rst_n = 1; clr = 0; ai = 0;
    #1 rst_n = 0; vi = 0; vi2 = 0;
    #20000 rst_n = 1;
    cwp(150.0, 1'b0, df, dg);
    check(!df && !dg, "150 ps absorbed by both lines");
    cwp(170.0, 1'b0, df, dg);
    check(df && dg, "170 ps passes without aggressor");
    check(t_out - t_in > 283.0 && t_out - t_in < 285.0, "line delay 284 ps");
    cwp(170.0, 1'b1, df, dg);
    check(!df && dg, "170 ps with aggressor: coupled line absorbs it, good line passes");
    cwp(220.0, 1'b1, df, dg);
    check(!df && dg, "220 ps with aggressor still under 227.6 ps");
    cwp(235.0, 1'b1, df, dg);
    check(df && dg, "235 ps with aggressor passes both");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #10000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
