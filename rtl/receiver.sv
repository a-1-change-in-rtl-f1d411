// 1c4 receiver (decoder) end of the link.
//
// The link lines wo enter the buffer (link_buf), which returns the phase
// request wi to the sender. The buffered word feeds Dec2, the same decoder as
// the sender's Dec1, reset to accept odd words so that the all-zero start-up
// word is ignored. Dec2's two dual-rail bits are turned into a 1-of-4 value by
// four AND terms (the OR of active-low rails in the transistor version):
// y[0] = 00, y[1] = 01, y[2] = 10, y[3] = 11. The consumer acknowledges y with
// y_ack (four-phase). codd / ceven tell whether the value came in an odd or an
// even word, for a deserializer. A value appears two clocks after its word
// reaches the buffer when the decoder is idle. Structure, decoder and reset
// phase follow the document; the clocked buffer is this design's choice.
module receiver
  import c1c4_pkg::*;
(
  input  logic     clk,
  input  logic     rst_n,
  input  code_t    wo,
  output logic     wi,
  output onehot4_t y,
  input  logic     y_ack,
  output logic     codd,
  output logic     ceven
);

  code_t q;
  logic  q_odd, dec_req;
  dr_t   c1, c0;

  link_buf u_buf (
    .clk, .rst_n, .d(wo), .wi, .q, .q_odd, .req(dec_req)
  );

  dec #(.E_RESET(1'b1)) u_dec2 (
    .clk, .rst_n, .si(q), .si_odd(q_odd), .co1(c1), .co0(c0), .ci(y_ack),
    .so(dec_req), .codd, .ceven
  );

  always_comb begin
    y[0] = c1.f && c0.f;
    y[1] = c1.f && c0.t;
    y[2] = c1.t && c0.f;
    y[3] = c1.t && c0.t;
  end

endmodule
