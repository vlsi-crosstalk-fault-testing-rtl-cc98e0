// Behavioural model (not synthesizable) of an aggressor/victim interconnect
// pair, for exercising the critical-width-pulse (CWP) crosstalk test.
//
// A pulse on a resistive-capacitive line only reaches the far end if it is at
// least as wide as the line's critical width (CW); narrower pulses are
// absorbed by the path delay inertia. A coupling capacitance Cf between the
// lines widens the CW of a victim 1 pulse when the aggressor falls at the
// same time (an opposite-polarity transition). The model applies that rule:
//   CW   = CW0_PS + CW_SLOPE_PS_PER_FF * CF_FF   if the aggressor falls within
//                                                COINCIDENCE_PS of the
//                                                victim pulse's rising edge
//   CW   = CW0_PS                                otherwise
//   the surviving pulse leaves vo DELAY_PS after it entered vi, with its width.
// The aggressor line output ao follows ai after DELAY_PS.
// The numbers are those of a 400 um line pair driven by a P1 (positive) pulse:
// CW 161 ps without fault, +1.48 ps per fF of Cf, line delay 284 ps. The
// linear law is the document's; the coincidence window, the sharp pass/absorb
// threshold and the pulse shape kept intact are this model's simplifications.
// Only positive victim pulses are modelled.
module interconnect_pair_model #(
  parameter real CW0_PS             = 161.0,
  parameter real CW_SLOPE_PS_PER_FF = 1.48,
  parameter real CF_FF              = 0.0,
  parameter real DELAY_PS           = 284.0,
  parameter real COINCIDENCE_PS     = 50.0
) (
  input  logic ai,   // aggressor line input
  input  logic vi,   // victim line input
  output logic ao,   // aggressor line output
  output logic vo    // victim line output
);
  timeunit 1ps;
  timeprecision 1ps;

  realtime t_rise;
  realtime t_agg_fall;
  real     width;
  real     cw;
  logic    coincident;

  initial begin
    ao         = 1'b0;
    vo         = 1'b0;
    t_rise     = 0.0;
    t_agg_fall = -1.0e9;
  end

  always @(posedge ai or negedge ai) begin
    automatic logic v = ai;
    if (!ai) t_agg_fall = $realtime;
    fork
      begin
        #(DELAY_PS) ao = v;
      end
    join_none
  end

  always @(posedge vi) t_rise = $realtime;

  always @(negedge vi) begin
    width      = $realtime - t_rise;
    coincident = (t_agg_fall - t_rise <= COINCIDENCE_PS) &&
                 (t_rise - t_agg_fall <= COINCIDENCE_PS);
    cw         = coincident ? CW0_PS + CW_SLOPE_PS_PER_FF * CF_FF : CW0_PS;
    if (width >= cw) begin
      fork
        begin
          automatic real w = width;
          if (DELAY_PS > w) #(DELAY_PS - w);
          vo = 1'b1;
          #(w) vo = 1'b0;
        end
      join_none
    end
  end

endmodule
