// Butterfly network (Xbar) of the 1c4 sender.
//
// Given the new data value as a 1-of-4 code di and the previous data value as
// two dual-rail bits (c0 = previous D0, c1 = previous D1, decoded from the
// codeword actually on the link), it raises exactly one of the four toggle
// requests to[3:0]: the line index is previous XOR new value. So line 0 toggles
// when the value repeats, line 1 when only D0 changes, line 2 when only D1
// changes and line 3 (the inversion line) when both change.
//
// The index XOR is done by two tiers of 2x2 blocks: the first tier swaps
// neighbouring lines (0<->1, 2<->3) when the previous D0 is 1, the second swaps
// the halves (0<->2, 1<->3) when the previous D1 is 1. The handshake is
// four-phase; the acknowledge ti from the toggle stage is passed back unchanged
// to both the data source (d_ack) and the decoder (c_ack). Latency is two
// clocks from valid inputs to a toggle request. The two-tier structure follows
// the document; which tier takes which bit is read from its toggle table.
module xbar
  import c1c4_pkg::*;
(
  input  logic     clk,
  input  logic     rst_n,
  input  onehot4_t di,
  input  dr_t      c0,
  input  dr_t      c1,
  output onehot4_t to,
  input  logic     ti,
  output logic     d_ack,
  output logic     c_ack
);

  onehot4_t   a;                 // first-tier outputs
  logic       t1_ack;            // second tier's data acknowledge = first tier's ti
  logic [1:0] t2_lo, t2_hi;

  // First tier: neighbours, controlled by previous D0.
  xbar_cell u_t1_lo (.clk, .rst_n, .di(di[1:0]), .c(c0), .to(a[1:0]),
                     .ti(t1_ack), .d_ack(d_ack), .c_ack());
  xbar_cell u_t1_hi (.clk, .rst_n, .di(di[3:2]), .c(c0), .to(a[3:2]),
                     .ti(t1_ack), .d_ack(), .c_ack());

  // Second tier: halves, controlled by previous D1. Block lo sees lines 0 and
  // 2, block hi lines 1 and 3.
  xbar_cell u_t2_lo (.clk, .rst_n, .di({a[2], a[0]}), .c(c1), .to(t2_lo),
                     .ti(ti), .d_ack(t1_ack), .c_ack(c_ack));
  xbar_cell u_t2_hi (.clk, .rst_n, .di({a[3], a[1]}), .c(c1), .to(t2_hi),
                     .ti(ti), .d_ack(), .c_ack());

  assign to    = {t2_hi[1], t2_lo[1], t2_hi[0], t2_lo[0]};

  a_in_1h:  assert property (@(posedge clk) disable iff (!rst_n) $onehot0(di));
  a_out_1h: assert property (@(posedge clk) disable iff (!rst_n) $onehot0(to));

endmodule
