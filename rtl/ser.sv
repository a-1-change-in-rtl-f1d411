// 2-to-1 serializer in front of the 1c4 sender.
//
// Two four-phase 1-of-4 input channels: in_odd carries the data pair that
// travels in odd link words, in_even the pair for even words. Dec1's phase
// signals decide which one goes next: while Dec1 holds an even word (ceven)
// the next word is odd, so in_odd is steered to the sender, and after an odd
// word (codd) in_even is. Since those phase signals fall as soon as the sender
// acknowledges, each side keeps its selection in a small state machine:
//   IDLE  -> SEL    on its phase signal (and the other side idle)
//   SEL   -> ACKED  when the sender acknowledges (dout_ack)
//   ACKED -> IDLE   when the sender drops its acknowledge
// While not IDLE the side's input is passed to dout; in ACKED its acknowledge
// is high, so the source withdraws its data, which completes the sender's
// four-phase handshake. The steering by Dec1's phase signals is the
// document's; the state machine is this design's choice.
module ser
  import c1c4_pkg::*;
(
  input  logic     clk,
  input  logic     rst_n,
  input  onehot4_t in_odd,
  output logic     ack_odd,
  input  onehot4_t in_even,
  output logic     ack_even,
  input  logic     codd,       // from Dec1: odd word on the link
  input  logic     ceven,      // from Dec1: even word on the link
  output onehot4_t dout,
  input  logic     dout_ack
);

  typedef enum logic [1:0] {IDLE, SEL, ACKED} side_t;
  side_t st_o, st_e;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      st_o <= IDLE;
      st_e <= IDLE;
    end else begin
      unique case (st_o)
        IDLE:    if (ceven && st_e == IDLE) st_o <= SEL;
        SEL:     if (dout_ack)              st_o <= ACKED;
        ACKED:   if (!dout_ack)             st_o <= IDLE;
        default:                            st_o <= IDLE;
      endcase
      unique case (st_e)
        IDLE:    if (codd && st_o == IDLE)  st_e <= SEL;
        SEL:     if (dout_ack)              st_e <= ACKED;
        ACKED:   if (!dout_ack)             st_e <= IDLE;
        default:                            st_e <= IDLE;
      endcase
    end
  end

  always_comb begin
    dout     = '0;
    if (st_o != IDLE) dout = dout | in_odd;
    if (st_e != IDLE) dout = dout | in_even;
    ack_odd  = (st_o == ACKED);
    ack_even = (st_e == ACKED);
  end

  a_one_side: assert property (@(posedge clk) disable iff (!rst_n)
                               !(st_o != IDLE && st_e != IDLE));
  a_phase_dr: assert property (@(posedge clk) disable iff (!rst_n) !(codd && ceven));

endmodule
