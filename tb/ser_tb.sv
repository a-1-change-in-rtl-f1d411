// Self-checking testbench for ser. Two four-phase sources offer random values
// on in_odd and in_even at random times; a model of the sender acknowledges
// dout and drives the phase signals as Dec1 would (ceven at start, then
// alternating, both low between words). Checks: dout alternates between the
// two sources starting with in_odd, each source's values arrive in order,
// dout is never driven outside a selected phase, and a source waiting for its
// phase (the other pair going first) is seen.
module ser_tb
  import c1c4_pkg::*;
;
  logic clk = 0, rst_n = 0;
  onehot4_t in_odd = '0, in_even = '0, dout;
  logic ack_odd, ack_even, codd = 0, ceven = 0, dout_ack = 0;
  int checks = 0, failures = 0, waits = 0;
  logic [1:0] q_odd [$], q_even [$];
  localparam int N = 200;

  ser dut (.clk, .rst_n, .in_odd, .ack_odd, .in_even, .ack_even, .codd, .ceven,
           .dout, .dout_ack);

  always #5 clk = ~clk;

  task automatic chk(input logic cond, input string msg);
    checks++;
    if (!cond) begin failures++; $display("FAIL: %s", msg); end
  endtask

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    @(negedge clk); @(negedge clk) rst_n = 1;
    for (int n = 0; n < N; n++) begin
      logic [1:0] v;
      repeat ($urandom % 5) @(negedge clk);
      v = 2'($urandom);
      q_odd.push_back(v);
      in_odd = 4'(1 << v);
      while (!ack_odd) @(negedge clk);
      in_odd = '0;
      while (ack_odd) @(negedge clk);
    end
  end

  initial begin
    @(negedge clk); @(negedge clk);
    for (int n = 0; n < N; n++) begin
      logic [1:0] v;
      repeat ($urandom % 5) @(negedge clk);
      v = 2'($urandom);
      q_even.push_back(v);
      in_even = 4'(1 << v);
      while (!ack_even) @(negedge clk);
      in_even = '0;
      while (ack_even) @(negedge clk);
    end
  end

  // sender + Dec1 model
  initial begin
    logic ph;                      // 1: next word odd
    ph = 1;
    @(negedge clk); @(negedge clk);
    for (int n = 0; n < 2 * N; n++) begin
      int w;
      ceven = ph; codd = !ph;
      w = 0;
      while (dout == '0 && w < 200) begin
        @(negedge clk); w++;
      end
      if ((ph && in_even != '0) || (!ph && in_odd != '0)) waits++;
      chk($onehot(dout), "dout valid");
      if (ph) chk(q_odd.size() > 0 && dout == 4'(1 << q_odd[0]), $sformatf("odd pair %0d", n));
      else    chk(q_even.size() > 0 && dout == 4'(1 << q_even[0]), $sformatf("even pair %0d", n));
      if (ph) void'(q_odd.pop_front()); else void'(q_even.pop_front());
      @(negedge clk) dout_ack = 1;
      ceven = 0; codd = 0;
      w = 0;
      while (dout != '0 && w < 200) begin @(negedge clk); w++; end
      chk(dout == '0, "dout withdrawn");
      @(negedge clk) dout_ack = 0;
      repeat (2 + $urandom % 3) begin @(negedge clk); chk(dout == '0, "idle between words"); end
      ph = !ph;
    end
    chk(waits > 0, "a source waited for its phase");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
