// Complete 1c4 interchip link with serializer and deserializer.
//
// Data path: two 1-of-4 input channels (in_odd, in_even) -> ser -> sender ->
// four link lines -> receiver -> des -> two 1-of-4 output channels (out_odd,
// out_even). Two data pairs share the four lines: one pair rides in odd words,
// the other in even words, and every word costs one line transition plus one
// transition of the request wire wi.
//
// The sender and receiver are meant for separate pad groups joined by board
// traces, so the top does not connect them: the sender's lines leave on tx_wo
// and its request enters on tx_wi; the receiver's lines enter on rx_wo and its
// request leaves on rx_wi. Connect tx_wo to rx_wo and rx_wi to tx_wi, with any
// delay on each wire: the protocol waits for every transition, so no delay
// breaks it. All input and output channels are four-phase (value, then
// acknowledge high, value withdrawn, acknowledge low). One clock, one
// synchronous active-low reset. The chain of blocks follows the document;
// leaving the board link open at the top is this design's choice, since the
// pads and traces are not logic.
module link_top
  import c1c4_pkg::*;
(
  input  logic     clk,
  input  logic     rst_n,
  // data in
  input  onehot4_t in_odd,
  output logic     in_odd_ack,
  input  onehot4_t in_even,
  output logic     in_even_ack,
  // sender pads
  output code_t    tx_wo,
  input  logic     tx_wi,
  // receiver pads
  input  code_t    rx_wo,
  output logic     rx_wi,
  // data out
  output onehot4_t out_odd,
  input  logic     out_odd_ack,
  output onehot4_t out_even,
  input  logic     out_even_ack
);

  onehot4_t s_d, r_y;
  logic     s_ack, r_ack;
  logic     s_codd, s_ceven, r_codd, r_ceven;

  ser u_ser (
    .clk, .rst_n,
    .in_odd, .ack_odd(in_odd_ack), .in_even, .ack_even(in_even_ack),
    .codd(s_codd), .ceven(s_ceven), .dout(s_d), .dout_ack(s_ack)
  );

  sender u_sender (
    .clk, .rst_n, .di(s_d), .d_ack(s_ack), .wo(tx_wo), .wi(tx_wi),
    .codd(s_codd), .ceven(s_ceven)
  );

  receiver u_receiver (
    .clk, .rst_n, .wo(rx_wo), .wi(rx_wi), .y(r_y), .y_ack(r_ack),
    .codd(r_codd), .ceven(r_ceven)
  );

  des u_des (
    .y(r_y), .y_ack(r_ack), .codd(r_codd), .ceven(r_ceven),
    .out_odd, .ack_odd(out_odd_ack), .out_even, .ack_even(out_even_ack)
  );

endmodule
