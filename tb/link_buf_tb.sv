// Self-checking testbench for link_buf. The testbench drives the link lines
// with a 1c4 word stream (one line flips per word) and plays the decoder's
// phase request. Checks: the buffer opens only while the request differs from
// the held parity, takes a word of the requested phase and then closes even if
// the lines move on (the sender running one word ahead), wi is the inverted
// parity of the held word, and the held sequence equals the sent one.
module link_buf_tb
  import c1c4_pkg::*;
;
  logic clk = 0, rst_n = 0;
  code_t d = '0, q;
  logic wi, q_odd, req = 0;
  int checks = 0, failures = 0, ahead = 0;
  code_t words [$];

  link_buf dut (.clk, .rst_n, .d, .wi, .q, .q_odd, .req);

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

  // sender model: answers wi by flipping one random line
  initial begin
    @(negedge clk); @(negedge clk) rst_n = 1;
    forever begin
      @(negedge clk);
      if ((^d) != wi) begin
        repeat ($urandom % 4) @(negedge clk);
        d = d ^ code_t'(1 << ($urandom % 4));
        words.push_back(d);
      end
    end
  end

  initial begin
    code_t held;
    @(negedge clk); @(negedge clk);
    #1 chk(q == '0 && wi, "reset: even word held, odd requested");
    for (int n = 0; n < 300; n++) begin
      int w;
      @(negedge clk) req = ~req;          // decoder asks for the next phase
      w = 0;
      while (q_odd != req && w < 50) begin @(posedge clk); #1; w++; end
      chk(q_odd == req, "word captured");
      chk(words.size() > 0 && q == words[0], $sformatf("held word %0d", n));
      chk(wi == !q_odd, "wi is the inverted parity");
      void'(words.pop_front());
      held = q;
      // decoder busy: the sender may already put the next word on the lines
      repeat (3 + $urandom % 6) begin
        @(posedge clk); #1;
        chk(q == held, "buffer closed while decoder busy");
      end
      if (d != held) ahead++;
    end
    chk(ahead > 0, "sender ran a word ahead");
    $display("sender ahead %0d times", ahead);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
