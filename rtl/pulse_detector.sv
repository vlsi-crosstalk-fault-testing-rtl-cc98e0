// Pulse detector at the output of a victim interconnect line.
//
// For the critical-width-pulse (CWP) test of an interconnect pair: a pulse
// applied to the input of the victim line either survives the line's delay
// inertia and reaches its output, or it is absorbed. The detector is a flag
// that is set asynchronously by the leading edge of a pulse at vo and cleared
// asynchronously by clr or reset; whether the pulse arrived is then read at leisure. POSITIVE=1 looks
// for a 1 pulse on a 0 line (P1), POSITIVE=0 for a 0 pulse on a 1 line (P0).
// The document names the detector and its job but not its circuit; the
// edge-set flag and the two-stage synchroniser into the clk domain
// (detected_sync, two clock cycles of latency) are this design's choice.
module pulse_detector #(
  parameter bit POSITIVE = 1'b1
) (
  input  logic clk,
  input  logic rst_n,
  input  logic vo,            // victim line output
  input  logic clr,           // clear the flag, active high
  output logic detected,      // raw flag
  output logic detected_sync  // flag synchronised to clk
);

  logic lead;
  logic aclr;                 // reset and clear merged into one async clear
  logic [1:0] sync_q;

  assign lead = POSITIVE ? vo : ~vo;

  assign aclr = clr | ~rst_n;

  always_ff @(posedge lead or posedge aclr) begin
    if (aclr) detected <= 1'b0;
    else      detected <= 1'b1;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) sync_q <= '0;
    else        sync_q <= {sync_q[0], detected};
  end

  assign detected_sync = sync_q[1];

endmodule
