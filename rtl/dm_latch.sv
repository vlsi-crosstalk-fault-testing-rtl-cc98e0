// Detection mode latch (DM).
//
// Stores, for one core output, whether that output lies on a path sensitized
// from the input that currently receives the squarewave. It follows its input
// while the enable DMLE is 1 and holds while DMLE is 0, as the document's
// latch does. Here it is a register clocked by the test
// clock and loaded on every edge at which le (DMLE) is 1, so the value held
// after DMLE falls is the one present in the last enabled cycle; making it
// edge-triggered instead of level-sensitive is this design's choice. Resets to 0.
module dm_latch (
  input  logic clk,
  input  logic rst_n,
  input  logic le,   // DMLE
  input  logic d,    // Xor1 output
  output logic q
);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)  q <= 1'b0;
    else if (le) q <= d;
  end

endmodule
