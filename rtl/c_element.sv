// Muller C-element with a reset value.
//
// The output goes high when both inputs are high, low when both are low, and
// keeps its value while they differ. In the link sender it joins the local
// decoder's request with the request wire from the receiver (CE in the block
// diagram), so that the toggle stage is enabled only when both ask for the same
// phase. The state is held in a flip-flop: an input pair that agrees at a rising
// clock edge sets the output at that edge, one cycle of latency. Reset low is
// this design's choice, matching the all-low (even) codeword at start-up.
module c_element #(
  parameter bit RESET_VALUE = 1'b0
) (
  input  logic clk,
  input  logic rst_n,
  input  logic a,
  input  logic b,
  output logic y
);

  always_ff @(posedge clk) begin
    if (!rst_n)          y <= RESET_VALUE;
    else if (a && b)     y <= 1'b1;
    else if (!a && !b)   y <= 1'b0;
  end

endmodule
