// Error detector (ED) of a scan-out cell.
//
// A sticky flag G that is set when its input F is 1 while the detection clock
// Det_ck is 0, and cleared by the error detector reset EDR:
//   G_next = (G | (F & ~Det_ck)) & ~EDR
// The document's detector is a level-sensitive feedback circuit with this
// function. This version evaluates it at the rising edge of the test clock
// (EDR has priority), so no combinational loop is formed; that is this
// design's choice, and it means F is looked at once per clock rather than
// continuously. Det_ck is kept active-low as in the
// document. Resets to 0.
module error_detector (
  input  logic clk,
  input  logic rst_n,
  input  logic f,       // Xor2 output
  input  logic det_ck,  // sample F while 0
  input  logic edr,     // error detector reset, active high
  output logic g
);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)               g <= 1'b0;
    else if (edr)             g <= 1'b0;
    else if (f && !det_ck)    g <= 1'b1;
  end

endmodule
