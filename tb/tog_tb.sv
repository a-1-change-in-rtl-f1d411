// Self-checking testbench for tog. For each word it raises one random toggle
// request, waits for the acknowledge, withdraws the request and then holds the
// phase request si for a random time before flipping it. Checks: the lines do
// not change before the acknowledge has dropped and si asks for a new word
// (the stall), then exactly the requested line flips, the parity follows si,
// se reports the pending request, and the acknowledge is an OR of the slices.
module tog_tb
  import c1c4_pkg::*;
;
  logic clk = 0, rst_n = 0;
  onehot4_t ti = '0;
  logic to, si = 0, so_odd, se;
  code_t so, prev;
  int checks = 0, failures = 0, stalls = 0;

  tog dut (.clk, .rst_n, .ti, .to, .si, .so, .so_odd, .se);

  always #5 clk = ~clk;

  task automatic chk(input logic cond, input string msg);
    checks++;
    if (!cond) begin failures++; $display("FAIL: %s", msg); end
  endtask

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2) @(posedge clk);
    @(negedge clk) rst_n = 1;
    @(posedge clk); #1;
    chk(so == 4'b0000 && !to, "reset state");
    for (int n = 0; n < 300; n++) begin
      int k, w;
      k = $urandom % 4;
      prev = so;
      @(negedge clk); ti = 4'(1 << k);
      w = 0;
      while (!to && w < 20) begin @(posedge clk); #1; w++; end
      chk(to, "acknowledge");
      // hold the request a few cycles: the acknowledge must stay
      repeat ($urandom % 3) begin @(posedge clk); #1; chk(to, "ack held while request held"); end
      @(negedge clk); ti = '0;
      w = 0;
      while (to && w < 20) begin @(posedge clk); #1; w++; end
      chk(!to, "acknowledge withdrawn");
      chk(so == prev, "no toggle before the phase request");
      chk(!se, "no new word requested yet");
      w = $urandom % 6;
      repeat (w) begin @(posedge clk); #1; chk(so == prev, "stalled while si unchanged"); end
      if (w > 0) stalls++;
      @(negedge clk); si = ~si;
      #1 chk(se, "se reports pending request");
      w = 0;
      while (so == prev && w < 20) begin @(posedge clk); #1; w++; end
      chk(so == (prev ^ code_t'(1 << k)), $sformatf("line %0d: %b -> %b", k, prev, so));
      chk(so_odd == si && !se, "parity follows request");
    end
    chk(stalls > 0, "stall exercised");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
