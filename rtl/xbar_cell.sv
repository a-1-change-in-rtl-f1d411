// One block of the butterfly (Xbar): two 2-to-1 muxes sharing a dual-rail
// control bit.
//
// Output to[0] takes di[0] when the control is false (c.f) and di[1] when it is
// true (c.t); to[1] takes the other input, so a true control swaps the two
// lines. Each output is a generalized C-element: it rises as soon as a data
// rail and its matching control rail are both high, and falls only once all
// four inputs (both data lines, both control rails) are low. The block is
// passive on both inputs and active on its output (four-phase handshake): its
// acknowledges to the data source (d_ack) and to the control source (c_ack) are
// simply the acknowledge ti from the next stage, as in the transistor version.
// Outputs reset low. Each output flip-flop adds one clock of latency. The
// set/clear rule and the wired acknowledges follow the transistor block; the
// flip-flop that holds each output is this design's choice.
module xbar_cell
  import c1c4_pkg::*;
(
  input  logic       clk,
  input  logic       rst_n,
  input  logic [1:0] di,
  input  dr_t        c,
  output logic [1:0] to,
  input  logic       ti,
  output logic       d_ack,
  output logic       c_ack
);

  logic [1:0] set;
  logic       clr;

  always_comb begin
    set[0] = (di[0] && c.f) || (di[1] && c.t);
    set[1] = (di[1] && c.f) || (di[0] && c.t);
    clr    = !di[0] && !di[1] && !c.t && !c.f;
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      to <= '0;
    end else begin
      for (int i = 0; i < 2; i++) begin
        if (set[i])   to[i] <= 1'b1;
        else if (clr) to[i] <= 1'b0;
      end
    end
  end

  assign d_ack = ti;
  assign c_ack = ti;

  // Handshake rules: a dual-rail bit never has both rails high, and the data
  // input is a 1-of-2 slice of a 1-of-4 code.
  a_ctrl_dr: assert property (@(posedge clk) disable iff (!rst_n) !(c.t && c.f));
  a_data_1h: assert property (@(posedge clk) disable iff (!rst_n) !(di[0] && di[1]));

endmodule
