// Crosstalk-fault BIST for an embedded combinational core, plus a pulse
// detector for critical-width-pulse interconnect tests.
//
// Squarewave BIST (left side of the top): the M input boundary-scan cells of
// the core form an LFSR that holds a random pattern, and a walking one picks
// the input that receives the squarewave Sq; all other inputs keep the
// pattern. The N output cells first learn which outputs follow Sq (sensitized
// outputs), then watch all outputs while Sq oscillates. A non-sensitized
// output that changes between two consecutive samples has caught a glitch
// induced by a crosstalk coupling from an oscillating line, and sets its
// error flag. One pattern is M such tests; NUM_PATTERNS patterns are run.
// The core itself lies outside: to_core / from_core are its ports.
//
// While bist_start is low the boundary-scan registers work as ordinary ones
// under ext_in_ctrl / ext_out_ctrl, with a single scan path
// tdi -> input cells -> output cells -> tdo.
//
// Interconnect test (right side, independent of the BIST): a behavioural
// model of an aggressor/victim line pair (simulation only) with a pulse
// detector on the victim line's far end. The pulse generator is outside:
// line_ai / line_vi are the near ends of the lines. A victim pulse of the
// critical width applied while the aggressor falls only arrives when no
// excess coupling exists; pd_detected tells whether it did. LINE_CF_FF sets
// the coupling capacitance of the modelled pair.
//
// Timing: one test clock clk, active-low asynchronous reset rst_n. bist_done
// rises about 1 + NUM_PATTERNS * (M + 3 + M * (OSC_CYCLES + 5)) cycles after
// bist_start. fault_found is sticky until reset or the next bist_start.
module xtalk_bist_top
  import xtalk_pkg::*;
#(
  parameter int unsigned M            = 4,
  parameter int unsigned N            = 4,
  parameter int unsigned NUM_PATTERNS = 15,
  parameter int unsigned OSC_CYCLES   = 8,
  parameter real         LINE_CF_FF   = 0.0
) (
  input  logic         clk,
  input  logic         rst_n,
  // BIST control and status
  input  logic         bist_start,
  output logic         bist_done,
  output phase_e       bist_phase,
  output logic         pattern_done,
  output logic [$clog2(M+1)-1:0]            bist_bit,      // input under test
  output logic [$clog2(NUM_PATTERNS+1)-1:0] bist_pattern,  // patterns finished
  output logic [N-1:0] err_flags,
  output logic         fault_found,
  // squarewave source
  input  logic         use_ext_sq,
  input  logic         ext_sq,
  // boundary scan in normal operation
  input  in_ctrl_t     ext_in_ctrl,
  input  out_ctrl_t    ext_out_ctrl,
  input  logic         tdi,
  output logic         tdo,
  // chip pins and core ports
  input  logic [M-1:0] pins_in,
  output logic [M-1:0] to_core,
  input  logic [N-1:0] from_core,
  output logic [N-1:0] pins_out,
  // interconnect line pair and pulse detector
  input  logic         line_ai,       // aggressor line near end
  input  logic         line_vi,       // victim line near end
  output logic         line_ao,       // aggressor line far end
  output logic         line_vo,       // victim line far end
  input  logic         pd_clear,
  output logic         pd_detected_raw,
  output logic         pd_detected
);

  in_ctrl_t  in_ctrl, in_ctrl_eff;
  out_ctrl_t out_ctrl;
  sq_mode_e  sq_mode;
  logic      sq;
  logic      in_scan_out;
  logic [M-1:0] in_cap;
  logic      running;

  bist_controller #(
    .M           (M),
    .NUM_PATTERNS(NUM_PATTERNS),
    .OSC_CYCLES  (OSC_CYCLES)
  ) u_ctrl (
    .clk         (clk),
    .rst_n       (rst_n),
    .start       (bist_start),
    .ext_in_ctrl (ext_in_ctrl),
    .ext_out_ctrl(ext_out_ctrl),
    .in_ctrl     (in_ctrl),
    .out_ctrl    (out_ctrl),
    .sq_mode     (sq_mode),
    .phase       (bist_phase),
    .pattern_done(pattern_done),
    .done        (bist_done),
    .bit_idx     (bist_bit),
    .pat_idx     (bist_pattern)
  );

  // In normal operation the serial input of the scan path is tdi.
  always_comb begin
    in_ctrl_eff = in_ctrl;
    if (bist_phase == PH_IDLE && !bist_done) in_ctrl_eff.scan_in = tdi;
  end

  sq_gen u_sq (
    .clk    (clk),
    .rst_n  (rst_n),
    .mode   (sq_mode),
    .use_ext(use_ext_sq),
    .ext_sq (ext_sq),
    .sq     (sq)
  );

  bs_in_register #(.M(M)) u_in (
    .clk     (clk),
    .rst_n   (rst_n),
    .ctrl    (in_ctrl_eff),
    .pins    (pins_in),
    .sq      (sq),
    .to_core (to_core),
    .cap     (in_cap),
    .scan_out(in_scan_out)
  );

  bs_out_register #(.N(N)) u_out (
    .clk      (clk),
    .rst_n    (rst_n),
    .ctrl     (out_ctrl),
    .from_core(from_core),
    .scan_in  (in_scan_out),
    .out      (pins_out),
    .err      (err_flags),
    .scan_out (tdo)
  );

  // Sticky summary of all error flags, taken when a pattern completes.
  assign running = (bist_phase != PH_IDLE);
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)                          fault_found <= 1'b0;
    else if (bist_start && !running && !bist_done) fault_found <= 1'b0;
    else if (pattern_done && |err_flags) fault_found <= 1'b1;
  end

  // During the selection and oscillation phases exactly one input carries Sq.
  assert property (@(posedge clk) disable iff (!rst_n)
                   (bist_phase == PH_SELECT || (bist_phase == PH_OSC && !pattern_done
                    && in_ctrl.ctm)) |-> $onehot(in_cap))
    else $error("walking-one register is not one-hot during a test");

  interconnect_pair_model #(.CF_FF(LINE_CF_FF)) u_line (
    .ai(line_ai),
    .vi(line_vi),
    .ao(line_ao),
    .vo(line_vo)
  );

  pulse_detector #(.POSITIVE(1'b1)) u_pd (
    .clk          (clk),
    .rst_n        (rst_n),
    .vo           (line_vo),
    .clr          (pd_clear),
    .detected     (pd_detected_raw),
    .detected_sync(pd_detected)
  );

endmodule
