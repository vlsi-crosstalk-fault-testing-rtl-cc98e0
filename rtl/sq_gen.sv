// Squarewave test signal source (Sq).
//
// Drives the squarewave that the walking-one input cell applies to the core.
// mode SQ_LOW and SQ_HIGH give the static 0 and 1 used in phase 2 to find the
// sensitized outputs; SQ_OSC gives the oscillation of phase 3, which starts at
// 0 in the first oscillating cycle and toggles at every rising test clock edge
// (period of two test clocks). The document allows the squarewave to come from
// a local oscillator or from elsewhere in the chip, so with use_ext=1 the
// oscillation is taken from ext_sq instead. The toggle-per-clock oscillator
// is this design's choice. Output is combinational from mode and one register.
module sq_gen
  import xtalk_pkg::*;
(
  input  logic     clk,
  input  logic     rst_n,
  input  sq_mode_e mode,
  input  logic     use_ext,
  input  logic     ext_sq,
  output logic     sq
);

  logic osc_q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)              osc_q <= 1'b0;
    else if (mode == SQ_OSC) osc_q <= ~osc_q;
    else                     osc_q <= 1'b0;
  end

  always_comb begin
    unique case (mode)
      SQ_HIGH: sq = 1'b1;
      SQ_OSC:  sq = use_ext ? ext_sq : osc_q;
      default: sq = 1'b0;
    endcase
  end

endmodule
