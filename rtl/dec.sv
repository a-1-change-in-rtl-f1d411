// 1c4 decoder with its two-phase control (Dec1 in the sender, Dec2 in the
// receiver).
//
// Datapath: si is decoded into two dual-rail bits co1 (D1) and co0 (D0) by
// c1c4_pkg::dec4, which accepts only words of the phase selected by e (1 = odd,
// 0 = even) and outputs no data otherwise. Control: two state bits e and so.
// When the consumer acknowledges the decoded value (ci high), e flips to the
// other phase, which clears the outputs at once. When the acknowledge is
// withdrawn, so takes the value of e, which asks the upstream stage for a word
// of that phase (so high = odd word wanted). In handshake terms:
//   loop { co := dec(si, e); wait ci; e := ~so; wait !ci; so := e }
// codd / ceven are the phase outputs: codd is high while an odd word is
// decoded and e is odd, ceven while an even word is decoded and e is even; the
// parity si_odd comes from the stage that drives si.
//
// E_RESET sets the phase accepted after reset. In the sender (Dec1) it is 0,
// so the all-zero start-up word decodes as value 00 and the butterfly has
// valid control at once. In the receiver (Dec2) it is 1: the start-up word is
// ignored and so rises one clock after reset to ask for the first odd word.
// so resets low. Each state change takes one clock.
module dec
  import c1c4_pkg::*;
#(
  parameter bit E_RESET = 1'b0
) (
  input  logic  clk,
  input  logic  rst_n,
  input  code_t si,        // codeword in
  input  logic  si_odd,    // parity of si, from the upstream parity tree
  output dr_t   co1,       // decoded D1
  output dr_t   co0,       // decoded D0
  input  logic  ci,        // acknowledge from the consumer of co
  output logic  so,        // phase request upstream: 1 = odd word
  output logic  codd,      // odd word decoded
  output logic  ceven      // even word decoded
);

  logic      e;
  dr_t [1:0] d;

  always_comb begin
    d     = dec4(si, e);
    co1   = d[1];
    co0   = d[0];
    codd  = si_odd && e;
    ceven = !si_odd && !e;
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      e  <= E_RESET;
      so <= 1'b0;
    end else if (ci && (e == so)) begin
      e  <= ~so;                 // [ci]; e := ~so
    end else if (!ci && (e != so)) begin
      so <= e;                   // [~ci]; so := e
    end
  end

  a_dr1: assert property (@(posedge clk) disable iff (!rst_n) !(co1.t && co1.f));
  a_dr0: assert property (@(posedge clk) disable iff (!rst_n) !(co0.t && co0.f));
  a_both_or_none: assert property (@(posedge clk) disable iff (!rst_n)
                                   ((co1.t || co1.f) == (co0.t || co0.f)));

endmodule
