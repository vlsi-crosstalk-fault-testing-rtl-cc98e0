// Phase controller of the squarewave crosstalk BIST.
//
// For each of NUM_PATTERNS random patterns and each of the M core inputs it
// runs the document's three phases, producing the scan-cell controls that the
// document shows as separate clocks (TCK0, TCK1, Cap_ck, Update_ck, Det_ck) as
// one-cycle enables of the single test clock:
//
//  phase 1 (once per pattern; EDR held high, error detectors cleared)
//    P1_RELOAD  Cap <= Update          restore the LFSR state (scan_in/reload=0)
//    P1_LFSR    one LFSR step          TCK0 (LFSR/shift_mode=1)
//    P1_UPDATE  Update <= Cap          the new pattern drives the core
//    P1_LOAD    M shifts of 0...01     leave a single 1 in Cap bit 0 (TCK1)
//  phase 2 (per input; DMLE=1)
//    P2_ZERO    Sq=0, core outputs settle
//    P2_CAP     Sq=0, output Cap/Update capture the settled core outputs
//    P2_ONE     Sq=1, DM follows (live output xor Cap)
//    P2_HOLD    Sq=1 held one more cycle; DM keeps the settled value, after
//               any glitch from the 0-to-1 step has died out: 1 = sensitized
//  phase 3 (per input; OSC_CYCLES cycles)
//    P3_OSC     Sq oscillates; output Cap/Update capture every cycle; Det_ck=0
//               from the third cycle on, when Cap and Update hold two
//               oscillation samples
//    P3_SHIFT   TCK1: walking one moves to the next input; after the last
//               input, pattern_done is pulsed with the error flags valid
//
// EDR is raised only in phase 1, so the error flags gather over all inputs of
// one pattern, as in the document's timing diagram. The phase order and the
// signals follow the document; the cycle counts, the Sq order 0 then 1 in
// phase 2 (the document's text gives it both ways; its timing diagram shows 0
// then 1), the settling cycles in phase 2, the reload step and the shift-in of the walking one are this
// design's choices. While idle the external boundary-scan controls pass
// through unchanged. start begins a run; done stays high until start is low.
module bist_controller
  import xtalk_pkg::*;
#(
  parameter int unsigned M            = 4,
  parameter int unsigned NUM_PATTERNS = 15,
  parameter int unsigned OSC_CYCLES   = 8
) (
  input  logic      clk,
  input  logic      rst_n,
  input  logic      start,
  input  in_ctrl_t  ext_in_ctrl,
  input  out_ctrl_t ext_out_ctrl,
  output in_ctrl_t  in_ctrl,
  output out_ctrl_t out_ctrl,
  output sq_mode_e  sq_mode,
  output phase_e    phase,
  output logic      pattern_done,
  output logic      done,
  output logic [$clog2(M+1)-1:0]            bit_idx,
  output logic [$clog2(NUM_PATTERNS+1)-1:0] pat_idx
);

  typedef enum logic [3:0] {
    S_IDLE, S_P1_RELOAD, S_P1_LFSR, S_P1_UPDATE, S_P1_LOAD,
    S_P2_ZERO, S_P2_CAP, S_P2_ONE, S_P2_HOLD, S_P3_OSC, S_P3_SHIFT, S_DONE
  } state_e;

  localparam int unsigned CW = $clog2((M > OSC_CYCLES ? M : OSC_CYCLES) + 1);

  state_e        state_q, state_d;
  logic [CW-1:0] cnt_q, cnt_d;
  logic [$clog2(M+1)-1:0]            bit_q, bit_d;
  logic [$clog2(NUM_PATTERNS+1)-1:0] pat_q, pat_d;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state_q <= S_IDLE;
      cnt_q   <= '0;
      bit_q   <= '0;
      pat_q   <= '0;
    end else begin
      state_q <= state_d;
      cnt_q   <= cnt_d;
      bit_q   <= bit_d;
      pat_q   <= pat_d;
    end
  end

  always_comb begin
    state_d = state_q;
    cnt_d   = cnt_q;
    bit_d   = bit_q;
    pat_d   = pat_q;
    unique case (state_q)
      S_IDLE:      if (start) begin
                     state_d = S_P1_RELOAD;
                     pat_d   = '0;
                   end
      S_P1_RELOAD: state_d = S_P1_LFSR;
      S_P1_LFSR:   state_d = S_P1_UPDATE;
      S_P1_UPDATE: begin
                     state_d = S_P1_LOAD;
                     cnt_d   = '0;
                   end
      S_P1_LOAD:   if (cnt_q == CW'(M - 1)) begin
                     state_d = S_P2_ZERO;
                     bit_d   = '0;
                   end else begin
                     cnt_d = cnt_q + 1'b1;
                   end
      S_P2_ZERO:   state_d = S_P2_CAP;
      S_P2_CAP:    state_d = S_P2_ONE;
      S_P2_ONE:    state_d = S_P2_HOLD;
      S_P2_HOLD:   begin
                     state_d = S_P3_OSC;
                     cnt_d   = '0;
                   end
      S_P3_OSC:    if (cnt_q == CW'(OSC_CYCLES - 1)) state_d = S_P3_SHIFT;
                   else                              cnt_d   = cnt_q + 1'b1;
      S_P3_SHIFT:  if (bit_q != ($bits(bit_q))'(M - 1)) begin
                     state_d = S_P2_ZERO;
                     bit_d   = bit_q + 1'b1;
                   end else if (pat_q == ($bits(pat_q))'(NUM_PATTERNS - 1)) begin
                     state_d = S_DONE;
                     pat_d   = pat_q + 1'b1;
                   end else begin
                     state_d = S_P1_RELOAD;
                     pat_d   = pat_q + 1'b1;
                   end
      S_DONE:      if (!start) state_d = S_IDLE;
      default:     state_d = S_IDLE;
    endcase
  end

  always_comb begin
    // BIST defaults: core driven by the stored pattern, outputs show G.
    in_ctrl  = '{cap_en: 1'b0, upd_en: 1'b0, scan_reload: 1'b1, lfsr_mode: 1'b0,
                 test_mode: 1'b1, ctm: 1'b0, scan_in: 1'b0};
    out_ctrl = '{cap_en: 1'b0, upd_en: 1'b0, scan_out: 1'b0, dmle: 1'b0,
                 det_ck: 1'b1, edr: 1'b0, test_mode: 1'b1, ctm: 1'b1};
    sq_mode      = SQ_LOW;
    phase        = PH_IDLE;
    pattern_done = 1'b0;
    done         = 1'b0;
    unique case (state_q)
      S_IDLE: begin
        in_ctrl  = ext_in_ctrl;
        out_ctrl = ext_out_ctrl;
      end
      S_P1_RELOAD: begin
        phase               = PH_PATTERN;
        in_ctrl.scan_reload = 1'b0;
        in_ctrl.cap_en      = 1'b1;
        out_ctrl.edr        = 1'b1;
      end
      S_P1_LFSR: begin
        phase             = PH_PATTERN;
        in_ctrl.lfsr_mode = 1'b1;
        in_ctrl.cap_en    = 1'b1;
        out_ctrl.edr      = 1'b1;
      end
      S_P1_UPDATE: begin
        phase          = PH_PATTERN;
        in_ctrl.upd_en = 1'b1;
        out_ctrl.edr   = 1'b1;
      end
      S_P1_LOAD: begin
        phase           = PH_PATTERN;
        in_ctrl.cap_en  = 1'b1;
        in_ctrl.scan_in = (cnt_q == CW'(M - 1));
        out_ctrl.edr    = 1'b1;
      end
      S_P2_ZERO: begin
        phase         = PH_SELECT;
        in_ctrl.ctm   = 1'b1;
        sq_mode       = SQ_LOW;
        out_ctrl.dmle = 1'b1;
      end
      S_P2_CAP: begin
        phase           = PH_SELECT;
        in_ctrl.ctm     = 1'b1;
        sq_mode         = SQ_LOW;
        out_ctrl.dmle   = 1'b1;
        out_ctrl.cap_en = 1'b1;
        out_ctrl.upd_en = 1'b1;
      end
      S_P2_ONE, S_P2_HOLD: begin
        phase         = PH_SELECT;
        in_ctrl.ctm   = 1'b1;
        sq_mode       = SQ_HIGH;
        out_ctrl.dmle = 1'b1;
      end
      S_P3_OSC: begin
        phase           = PH_OSC;
        in_ctrl.ctm     = 1'b1;
        sq_mode         = SQ_OSC;
        out_ctrl.cap_en = 1'b1;
        out_ctrl.upd_en = 1'b1;
        out_ctrl.det_ck = (cnt_q < CW'(2));
      end
      S_P3_SHIFT: begin
        phase          = PH_OSC;
        in_ctrl.cap_en = 1'b1;
        pattern_done   = (bit_q == ($bits(bit_q))'(M - 1));
      end
      S_DONE: begin
        done = 1'b1;
      end
      default: ;
    endcase
  end

  assign bit_idx = bit_q;
  assign pat_idx = pat_q;

  initial begin
    assert (OSC_CYCLES >= 3) else $error("bist_controller: OSC_CYCLES must be at least 3");
  end

endmodule
