// 1c4 sender (encoder) end of the link.
//
// Takes one data value at a time as a four-phase 1-of-4 code (di, acknowledged
// by d_ack) and drives the four link lines wo so that each value costs exactly
// one line transition. The butterfly (xbar) picks the line to flip from the new
// value and the previous one; the previous value is not stored but decoded back
// from the lines themselves by Dec1, so the encoder always compares with what
// was really sent. The toggle stage (tog) flips the line once both Dec1 and the
// receiver ask for the next phase; a C-element joins those two requests.
//
// Link protocol (two-phase): the receiver raises wi to ask for an odd word and
// lowers it to ask for an even one; the sender answers by changing one line of
// wo, which moves its parity to the requested phase. After reset wo = 0000
// (even); the first word sent is odd. codd / ceven are Dec1's phase signals,
// used by a serializer to choose which data pair goes into the next word
// (ceven high: the next word is odd). Structure and handshakes follow the
// document; the clocked state elements are this design's choice.
module sender
  import c1c4_pkg::*;
(
  input  logic     clk,
  input  logic     rst_n,
  input  onehot4_t di,
  output logic     d_ack,
  output code_t    wo,
  input  logic     wi,
  output logic     codd,
  output logic     ceven
);

  dr_t      c0, c1;
  onehot4_t tog_req;
  logic     tog_ack, c_ack;
  logic     si, so_odd, dec_req;

  xbar u_xbar (
    .clk, .rst_n, .di, .c0, .c1, .to(tog_req), .ti(tog_ack), .d_ack, .c_ack
  );

  tog u_tog (
    .clk, .rst_n, .ti(tog_req), .to(tog_ack), .si, .so(wo), .so_odd, .se()
  );

  dec #(.E_RESET(1'b0)) u_dec1 (
    .clk, .rst_n, .si(wo), .si_odd(so_odd), .co1(c1), .co0(c0), .ci(c_ack),
    .so(dec_req), .codd, .ceven
  );

  c_element #(.RESET_VALUE(1'b0)) u_ce (
    .clk, .rst_n, .a(dec_req), .b(wi), .y(si)
  );

endmodule
