// Toggle stage (Tog) of the 1c4 sender: holds the codeword on the link lines
// and flips one line per transmitted data value.
//
// Each of the four slices follows the same handshake sequence. Slice i waits
// for its toggle request ti[i] and acknowledges it (to[i] high). It then waits
// until the receiver's phase request si matches the parity of the lines, which
// confirms that the previous toggle has been seen, and primes its internal
// state u[i] with the complement of its line. After the request is withdrawn
// it drops its acknowledge, waits for si to ask for the next phase (si differs
// from the parity) and finally copies u[i] onto its line so[i]. Only one line
// changes per word, so the parity of so alternates between odd and even words.
//
// Because the acknowledge is withdrawn before the line toggles, the request
// side and the link side never overlap: the stage gives a full cycle of slack.
// so_odd is the parity (XOR tree) of the lines; se = si ^ so_odd is high while
// a new word is requested; to is the OR of the four slice acknowledges. All
// state resets low, so the link starts on the even all-zero word. Each step of
// the sequence takes one clock. The sequence is the document's; holding each
// state variable in a flip-flop is this design's choice.
module tog
  import c1c4_pkg::*;
(
  input  logic     clk,
  input  logic     rst_n,
  input  onehot4_t ti,       // toggle request from the butterfly (1-of-4)
  output logic     to,       // acknowledge to the butterfly
  input  logic     si,       // phase request: 1 = odd word wanted
  output code_t    so,       // link lines
  output logic     so_odd,   // parity of the link lines
  output logic     se        // a new word is requested
);

  logic [3:0] to_s;          // per-slice acknowledge
  logic [3:0] u;             // per-slice primed value

  assign so_odd = odd4(so);
  assign se     = si ^ so_odd;
  assign to     = |to_s;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      to_s <= '0;
      u    <= '0;
      so   <= '0;
    end else begin
      for (int i = 0; i < 4; i++) begin
        if (!to_s[i] && (u[i] == so[i]) && ti[i])
          to_s[i] <= 1'b1;                         // [ti]; to+
        else if (to_s[i] && (u[i] == so[i]) && !se)
          u[i] <= ~so[i];                          // [si=odd(so)]; u:=~so
        else if (to_s[i] && (u[i] != so[i]) && !ti[i])
          to_s[i] <= 1'b0;                         // [~ti]; to-
        else if (!to_s[i] && (u[i] != so[i]) && se)
          so[i] <= u[i];                           // [si=~odd(so)]; so:=u
      end
    end
  end

  a_req_1h: assert property (@(posedge clk) disable iff (!rst_n) $onehot0(ti));
  a_one_change: assert property (@(posedge clk) disable iff (!rst_n)
                                 $onehot0(so ^ $past(so)));

endmodule
