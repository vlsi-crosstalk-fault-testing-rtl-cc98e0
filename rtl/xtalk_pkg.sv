// Shared types for the squarewave crosstalk BIST.
//
// The BIST wraps a combinational core with modified boundary-scan cells. On the
// input side the cells form an LFSR (random pattern), a walking-one shift
// register (which input gets the squarewave) and the pattern/squarewave
// multiplexer. On the output side each cell holds a detection-mode latch and an
// error detector. The control signals of the two cell kinds travel as the
// packed structs below, one copy for every cell of a register.
//
// The signal names follow the boundary-scan cell drawings (scan_in/reload,
// LFSR/shift_mode, test_mode, coupling_test_mode, scan_out, DMLE, Det_ck, EDR).
// The gated test clocks of the original (TCK0, Cap_ck, Update_ck) are modelled
// as clock enables of a single test clock; that is this design's choice.
package xtalk_pkg;

  // Width of one LFSR segment; each segment uses the primitive polynomial
  // 1 + x + x^4.
  localparam int unsigned LFSR_SEG = 4;

  // The three phases of one test, plus idle.
  typedef enum logic [1:0] {
    PH_IDLE    = 2'd0,
    PH_PATTERN = 2'd1,  // phase 1: random test pattern generation
    PH_SELECT  = 2'd2,  // phase 2: oscillation port selection, stable logic latch
    PH_OSC     = 2'd3   // phase 3: oscillation test
  } phase_e;

  // Squarewave source mode.
  typedef enum logic [1:0] {
    SQ_LOW  = 2'd0,
    SQ_HIGH = 2'd1,
    SQ_OSC  = 2'd2
  } sq_mode_e;

  // Controls of the scan-in register.
  typedef struct packed {
    logic cap_en;       // capture clock Cap_cki (TCK0 / TCK1 pulses)
    logic upd_en;       // update clock Upd_cki
    logic scan_reload;  // scan_in/reload: 1 = shift from previous Cap, 0 = load from 3-to-1 MUX
    logic lfsr_mode;    // LFSR/shift_mode: 1 = first cell of a segment takes the LFSR feedback
    logic test_mode;    // test_mode: 0 = core input comes from the pin
    logic ctm;          // coupling_test_mode: 1 = a cell whose Cap is 1 drives Sq
    logic scan_in;      // boundary_scan_in, serial input of the register
  } in_ctrl_t;

  // Controls of the scan-out register.
  typedef struct packed {
    logic cap_en;       // capture clock Cap_cko
    logic upd_en;       // update clock Update_cko
    logic scan_out;     // scan_out (SO): 1 = Cap loads from the previous cell
    logic dmle;         // detection mode latch enable
    logic det_ck;       // Det_ck: the error detector samples F while this is 0
    logic edr;          // error detector reset
    logic test_mode;    // TM
    logic ctm;          // coupling_test_mode
  } out_ctrl_t;

endpackage
