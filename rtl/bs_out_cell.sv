// Modified boundary scan-out cell with crosstalk glitch detection.
//
// A conventional scan-out cell (input MUX selecting the core output FC or the
// previous cell FLC by scan_out, capture register Cap, update register Update,
// output MUX) extended, as the document draws it, with:
//   C    = DMLE ? A : B     A = Cap input (live core output), B = Update
//   E    = C ^ Cap          Xor1: output changed between two samples
//   D    = DM latch of E    1 = this output follows the squarewave (sensitized)
//   F    = D ^ E            Xor2: behaviour differs from the expected one
//   G    = error detector   sticky F while Det_ck = 0, cleared by EDR
//   Out  = TM=0 ? FC : (CTM ? G : Update)
// In phase 2 Cap holds the output for Sq=0 and A shows it for Sq=1, so DM
// latches whether the output toggles with Sq. In phase 3 Cap and Update hold
// two consecutive samples; a non-sensitized output that changes (a captured
// induced glitch), or a sensitized one that stops toggling, sets G.
//
// Interface: ctrl (out_ctrl_t), fc, flc; out, tnc (to next cell = Cap), g.
// Timing: Cap/Update/DM/ED on the rising test clock edge under the enables.
module bs_out_cell
  import xtalk_pkg::*;
(
  input  logic      clk,
  input  logic      rst_n,
  input  out_ctrl_t ctrl,
  input  logic      fc,    // from circuit
  input  logic      flc,   // from last cell
  output logic      out,   // cell output (pin)
  output logic      tnc,   // to next cell
  output logic      g      // error detector output
);

  logic a, c, e, d, f;
  logic cap_q, upd_q;

  assign a = ctrl.scan_out ? flc : fc;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      cap_q <= 1'b0;
      upd_q <= 1'b0;
    end else begin
      if (ctrl.cap_en) cap_q <= a;
      if (ctrl.upd_en) upd_q <= cap_q;
    end
  end

  assign c = ctrl.dmle ? a : upd_q;
  assign e = c ^ cap_q;

  dm_latch u_dm (
    .clk  (clk),
    .rst_n(rst_n),
    .le   (ctrl.dmle),
    .d    (e),
    .q    (d)
  );

  assign f = d ^ e;

  error_detector u_ed (
    .clk   (clk),
    .rst_n (rst_n),
    .f     (f),
    .det_ck(ctrl.det_ck),
    .edr   (ctrl.edr),
    .g     (g)
  );

  always_comb begin
    if (!ctrl.test_mode) out = fc;
    else if (ctrl.ctm)   out = g;
    else                 out = upd_q;
  end

  assign tnc = cap_q;

endmodule
