// Modified boundary scan-out register: the detector block.
//
// N modified scan-out cells, one per core output, chained through their Cap
// registers for boundary-scan shifting (cell 0 takes scan_in, cell N-1 gives
// scan_out). All cells share one set of controls. err gathers the error
// detector flags; out is what the cells drive to the output pins.
// Timing: registers on the rising edge of clk under the ctrl enables.
module bs_out_register
  import xtalk_pkg::*;
#(
  parameter int unsigned N = 4
) (
  input  logic         clk,
  input  logic         rst_n,
  input  out_ctrl_t    ctrl,
  input  logic [N-1:0] from_core,
  input  logic         scan_in,
  output logic [N-1:0] out,
  output logic [N-1:0] err,
  output logic         scan_out
);

  logic [N:0] chain;
  assign chain[0] = scan_in;

  for (genvar i = 0; i < N; i++) begin : g_cell
    bs_out_cell u_cell (
      .clk  (clk),
      .rst_n(rst_n),
      .ctrl (ctrl),
      .fc   (from_core[i]),
      .flc  (chain[i]),
      .out  (out[i]),
      .tnc  (chain[i+1]),
      .g    (err[i])
    );
  end

  assign scan_out = chain[N];

endmodule
