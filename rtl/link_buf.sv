// Receive buffer (Buf) at the receiving end of the 1c4 link.
//
// A single four-bit register q that follows the link lines d while it is
// "open" and holds otherwise. It is open while the decoder behind it asks for
// a word of the other phase than the one it holds (req != parity of q); as
// soon as a word of the requested phase arrives the parity flips and the
// buffer closes. The request back to the sender is the inverted parity of q
// (wi = 0 after an odd word, asking for an even one; wi = 1 after an even
// word), so the sender can put the next word on the lines while the decoder is
// still working on the one held here. There is no separate request wire: only
// one line changes per word, so the parity (XOR tree) is the request and the
// acknowledge. q resets to the all-zero even word, so wi is high after reset.
// Capture takes one clock. The open/close rule is this design's choice; the
// document gives the buffer's role, its parity-tree acknowledge and that it
// resembles a transition-signalling latch pipeline stage.
module link_buf
  import c1c4_pkg::*;
(
  input  logic  clk,
  input  logic  rst_n,
  input  code_t d,        // link lines from the sender
  output logic  wi,       // phase request to the sender: 1 = odd word
  output code_t q,        // held word, to the decoder
  output logic  q_odd,    // parity of q
  input  logic  req       // decoder's phase request: 1 = odd word
);

  assign q_odd = odd4(q);
  assign wi    = ~q_odd;

  always_ff @(posedge clk) begin
    if (!rst_n)              q <= '0;
    else if (req != q_odd)   q <= d;
  end

  a_one_change: assert property (@(posedge clk) disable iff (!rst_n)
                                 $onehot0(q ^ $past(q)));

endmodule
