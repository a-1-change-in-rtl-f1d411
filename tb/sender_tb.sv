// Self-checking testbench for the 1c4 sender.
//
// The testbench plays the receiver: it holds the request wi, waits until the
// lines carry a word of the requested phase, decodes it independently
// (D1 = C2^C3, D0 = C1^C3), waits a random time and flips wi to ask for the
// next word. A data source feeds values as four-phase 1-of-4 codes. First the
// bit values printed in the measured waveform of the link are sent and the
// exact codeword sequence is compared with one computed from the coding rule;
// then random values. Checks: decoded values in order, exactly one line change
// per word, alternating parity, no change while the receiver has not asked,
// Dec1's phase signals, and that every one of the four lines toggled.
module sender_tb
  import c1c4_pkg::*;
;
  logic clk = 0, rst_n = 0;
  onehot4_t di = '0;
  logic d_ack, wi = 1, codd, ceven;
  code_t wo, last;
  int checks = 0, failures = 0;
  int line_count[4] = '{0, 0, 0, 0};
  int inverted = 0, held = 0;
  localparam int NFIG = 10;
  localparam logic [1:0] FIG_BITS [NFIG] = '{2'b00, 2'b00, 2'b10, 2'b01, 2'b10,
                                             2'b01, 2'b00, 2'b11, 2'b01, 2'b00};
  localparam int NRAND = 400;
  logic [1:0] sent [$];

  sender dut (.clk, .rst_n, .di, .d_ack, .wo, .wi, .codd, .ceven);

  always #5 clk = ~clk;

  task automatic chk(input logic cond, input string msg);
    checks++;
    if (!cond) begin failures++; $display("FAIL: %s", msg); end
  endtask

  // Coding rule: flip line (previous value XOR new value).
  function automatic code_t next_code(code_t c, logic [1:0] d);
    logic [1:0] p;
    p = {c[2] ^ c[3], c[1] ^ c[3]};
    return c ^ code_t'(1 << (p ^ d));
  endfunction

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // data source
  initial begin
    @(negedge clk); @(negedge clk) rst_n = 1;
    for (int n = 0; n < NFIG + NRAND; n++) begin
      logic [1:0] v;
      v = (n < NFIG) ? FIG_BITS[n] : 2'($urandom);
      repeat ($urandom % 3) @(negedge clk);
      sent.push_back(v);
      di = 4'(1 << v);
      while (!d_ack) @(negedge clk);
      di = '0;
      while (d_ack) @(negedge clk);
    end
  end

  // receiver model
  initial begin
    code_t exp_code;
    exp_code = '0;
    last = '0;
    @(negedge clk); @(negedge clk);
    #1 chk(ceven && !codd, "Dec1 holds the even start-up word");
    for (int n = 0; n < NFIG + NRAND; n++) begin
      int w;
      w = 0;
      while ((^wo) != wi && w < 200) begin
        @(posedge clk); #1; w++;
        chk($countones(wo ^ last) <= 1, "at most one line changes");
        if ((^wo) != wi) chk(wo == last, "no change before the word");
      end
      chk((^wo) == wi, "word arrived");
      chk($countones(wo ^ last) == 1, "exactly one line changed");
      for (int i = 0; i < 4; i++) if (wo[i] != last[i]) line_count[i]++;
      if (wo[3]) inverted++;
      chk(sent.size() > 0 && {wo[2] ^ wo[3], wo[1] ^ wo[3]} == sent[0],
          $sformatf("word %0d: %b decodes wrong", n, wo));
      if (n < NFIG) begin
        exp_code = next_code(exp_code, FIG_BITS[n]);
        chk(wo == exp_code, $sformatf("waveform word %0d: %b expected %b", n, wo, exp_code));
      end
      void'(sent.pop_front());
      last = wo;
      // hold the request: the lines must stay put
      w = $urandom % 8;
      if (w > 4) held++;
      repeat (w) begin @(posedge clk); #1; chk(wo == last, "lines held while not requested"); end
      @(negedge clk) wi = ~wi;
    end
    for (int i = 0; i < 4; i++) chk(line_count[i] > 0, $sformatf("line %0d never toggled", i));
    chk(inverted > 0 && held > 0, "inverted words and receiver stalls seen");
    $display("lines toggled %0d %0d %0d %0d, inverted words %0d, stalls %0d",
             line_count[0], line_count[1], line_count[2], line_count[3], inverted, held);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
