// Modified boundary scan-in register: the random pattern generator block.
//
// M modified scan-in cells in one chain. Together they are the three parts of
// the input side of the BIST: an M-bit LFSR, a shift register that walks a
// single 1 from the lowest to the highest bit, and the M-bit multiplexer that
// gives the squarewave Sq to the one input whose walking-one bit is set and
// the stored random pattern to all others.
//
// LFSR: the chain is cut into segments of four cells, each a Fibonacci LFSR
// of the primitive polynomial 1 + x + x^4 (cap[b] <= cap[b+3] ^ cap[b+2],
// cap[b+k] <= cap[b+k-1]). The document gives this polynomial for a 4-bit
// register and proposes splitting wide registers into smaller LFSRs; the
// segment length of four for every width, and the per-segment seeds
// (segment s starts from (s mod 15) + 1), are this design's choice.
// With lfsr_mode=0 the chain is a plain shift register fed by ctrl.scan_in,
// which serves both the walking one and ordinary boundary-scan shifting.
//
// Interface: ctrl (shared by all cells), pins (normal inputs), sq, to_core
// (core inputs), cap (Cap contents, the walking-one register), scan_out.
// Timing: all registers on the rising edge of clk, gated by ctrl enables.
module bs_in_register
  import xtalk_pkg::*;
#(
  parameter int unsigned M = 4
) (
  input  logic         clk,
  input  logic         rst_n,
  input  in_ctrl_t     ctrl,
  input  logic [M-1:0] pins,
  input  logic         sq,
  output logic [M-1:0] to_core,
  output logic [M-1:0] cap,
  output logic         scan_out
);

  localparam int unsigned NSEG = M / LFSR_SEG;

  // Segment seeds: 1, 2, ..., 15, 1, ...
  function automatic logic [M-1:0] seed_of();
    logic [M-1:0] s;
    s = '0;
    for (int unsigned g = 0; g < NSEG; g++)
      for (int unsigned k = 0; k < LFSR_SEG; k++)
        s[g*LFSR_SEG+k] = 1'(((g % 15) + 1) >> k);
    return s;
  endfunction

  localparam logic [M-1:0] SEED = seed_of();

  logic [M-1:0] ser_in;

  always_comb begin
    for (int unsigned i = 0; i < M; i++) begin
      if (ctrl.lfsr_mode && (i % LFSR_SEG == 0))
        ser_in[i] = cap[i+3] ^ cap[i+2];
      else if (i == 0)
        ser_in[i] = ctrl.scan_in;
      else
        ser_in[i] = cap[i-1];
    end
  end

  for (genvar i = 0; i < M; i++) begin : g_cell
    bs_in_cell #(.SEED(SEED[i])) u_cell (
      .clk    (clk),
      .rst_n  (rst_n),
      .ctrl   (ctrl),
      .pin    (pins[i]),
      .ser_in (ser_in[i]),
      .sq     (sq),
      .to_core(to_core[i]),
      .cap_q  (cap[i])
    );
  end

  assign scan_out = cap[M-1];

  initial begin
    assert (M >= LFSR_SEG && M % LFSR_SEG == 0)
      else $error("bs_in_register: M must be a multiple of %0d", LFSR_SEG);
  end

endmodule
