// Cycle-level model of a small combinational core with an optional crosstalk
// coupling, used by the BIST testbenches.
//
//   X  = in[0] ^ in[1]        aggressor line
//   Y  = in[2] & in[3]        victim line
//   out[0] = X, out[1] = Y, out[2] = in[2] & ~Y, out[3] = in[0] & in[2]
//
// With fault_en, a rising X induces a 1 pulse on Y while Y is 0, and a falling
// X a 0 pulse while Y is 1. The pulse is modelled as Y being inverted for the
// clock cycle in which X made such a transition (X compared with its value at the last
// rising clock edge), so that a capture at the end of that cycle catches it.
module xt_cut_model (
  input  logic       clk,
  input  logic       fault_en,
  input  logic [3:0] in,
  output logic [3:0] out
);
  logic x, y, y_seen, x_prev;

  initial x_prev = 1'b0;
  always @(posedge clk) x_prev <= x;

  always_comb begin
    x      = in[0] ^ in[1];
    y      = in[2] & in[3];
    y_seen = y ^ (fault_en && ((x && !x_prev && !y) || (!x && x_prev && y)));
    out[0] = x;
    out[1] = y_seen;
    out[2] = in[2] & ~y_seen;
    out[3] = in[0] & in[2];
  end
endmodule
