// 1-to-2 deserializer behind the 1c4 receiver.
//
// Steers each received 1-of-4 value to one of two four-phase output channels
// according to Dec2's phase signals: values that came in odd link words go to
// out_odd, values from even words to out_even. The phase signals rise and fall
// together with the decoded value (both are gated by the same decoder state),
// so plain AND gating is enough and no storage is needed. The acknowledge back
// to the receiver is the OR of the two output acknowledges. Purely
// combinational. The steering by Dec2's phase signals is the document's; the
// gating is this design's choice.
module des
  import c1c4_pkg::*;
(
  input  onehot4_t y,
  output logic     y_ack,
  input  logic     codd,       // from Dec2: the value came in an odd word
  input  logic     ceven,      // from Dec2: the value came in an even word
  output onehot4_t out_odd,
  input  logic     ack_odd,
  output onehot4_t out_even,
  input  logic     ack_even
);

  always_comb begin
    out_odd  = codd  ? y : '0;
    out_even = ceven ? y : '0;
    y_ack    = ack_odd || ack_even;
  end

endmodule
