// Modified boundary scan-in cell.
//
// A conventional boundary scan-in cell (capture register Cap, update register
// Update) with a 3-to-1 multiplexer in front of the core input:
//   test_mode=0                      -> core input from the pin
//   test_mode=1, Cap=0 or ctm=0      -> core input from Update (stored pattern)
//   test_mode=1, Cap=1 and ctm=1     -> core input from the squarewave Sq
// A 2-to-1 multiplexer in front of Cap selects the serial input (previous cell
// or LFSR feedback, scan_in/reload=1) or the 3-to-1 multiplexer output
// (scan_in/reload=0: pin capture in normal mode, reload from Update in test
// mode). Both truth tables follow the document.
//
// Timing: Cap loads at the rising test clock edge when ctrl.cap_en is 1,
// Update loads Cap when ctrl.upd_en is 1. The core input is combinational.
// Update resets to SEED (the cell's bit of the LFSR seed) and Cap to 0; the
// reset values and the single-clock-with-enables form are this design's choice.
module bs_in_cell
  import xtalk_pkg::*;
#(
  parameter bit SEED = 1'b0
) (
  input  logic     clk,
  input  logic     rst_n,
  input  in_ctrl_t ctrl,
  input  logic     pin,       // from the chip pin (normal input)
  input  logic     ser_in,    // previous cell's Cap or LFSR feedback
  input  logic     sq,        // squarewave test signal
  output logic     to_core,   // 3-to-1 MUX output to the core
  output logic     cap_q      // Cap output (serial out, walking-one bit)
);

  logic upd_q;
  logic cap_d;

  always_comb begin
    if (!ctrl.test_mode)           to_core = pin;
    else if (cap_q && ctrl.ctm)    to_core = sq;
    else                           to_core = upd_q;
  end

  assign cap_d = ctrl.scan_reload ? ser_in : to_core;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      cap_q <= 1'b0;
      upd_q <= SEED;
    end else begin
      if (ctrl.cap_en) cap_q <= cap_d;
      if (ctrl.upd_en) upd_q <= cap_q;
    end
  end

endmodule
