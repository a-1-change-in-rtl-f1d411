// Self-checking testbench for dec, both reset phases. Walks the decoder
// through many handshakes with random codewords: each decoded value is compared
// with D1 = C2^C3, D0 = C1^C3 when the word's parity matches the accepted
// phase, and with "no data" otherwise; codd/ceven, the e/so sequence and the
// start-up behaviour of both variants are checked too.
module dec_tb
  import c1c4_pkg::*;
;
  logic clk = 0, rst_n = 0;
  code_t si = '0;
  logic ci1 = 0, ci2 = 0;
  dr_t c1a, c0a, c1b, c0b;
  logic so1, so2, codd1, ceven1, codd2, ceven2;
  int checks = 0, failures = 0;

  dec #(.E_RESET(1'b0)) dut1 (.clk, .rst_n, .si, .si_odd(^si), .co1(c1a), .co0(c0a),
                              .ci(ci1), .so(so1), .codd(codd1), .ceven(ceven1));
  dec #(.E_RESET(1'b1)) dut2 (.clk, .rst_n, .si, .si_odd(^si), .co1(c1b), .co0(c0b),
                              .ci(ci2), .so(so2), .codd(codd2), .ceven(ceven2));

  always #5 clk = ~clk;

  task automatic chk(input logic cond, input string msg);
    checks++;
    if (!cond) begin failures++; $display("FAIL: %s", msg); end
  endtask

  // Reference: rails for a word when the accepted phase is 'ph'.
  function automatic logic [3:0] ref_rails(code_t w, logic ph);
    logic d1, d0;
    d1 = w[2] ^ w[3];
    d0 = w[1] ^ w[3];
    if ((^w) != ph) return 4'b0000;
    return {d1, ~d1, d0, ~d0};
  endfunction

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic ph;
    repeat (2) @(posedge clk);
    @(negedge clk) rst_n = 1;
    #1;
    // start-up: Dec1 decodes the all-zero word, Dec2 ignores it
    chk({c1a, c0a} == 4'b0101 && ceven1 && !codd1, "Dec1 decodes 0000 after reset");
    chk({c1b, c0b} == 4'b0000 && !ceven2 && !codd2, "Dec2 ignores 0000 after reset");
    chk(!so1 && !so2, "so low in reset");
    @(posedge clk); #1;
    chk(so2 && !so1, "Dec2 requests an odd word at once, Dec1 waits");
    // exhaustive decode of all 16 words in both phases, from Dec1 (even phase now)
    for (int w = 0; w < 16; w++) begin
      @(negedge clk); si = 4'(w);
      #1 chk({c1a, c0a} == ref_rails(4'(w), 1'b0), $sformatf("even decode %b", w));
      chk({c1b, c0b} == ref_rails(4'(w), 1'b1), $sformatf("odd decode %b", w));
    end
    // handshake sequence on Dec1: phase alternates, so follows e after ci drops
    ph = 0;
    for (int n = 0; n < 200; n++) begin
      code_t w;
      w = code_t'($urandom);
      if ((^w) != ph) w[0] = ~w[0];
      @(negedge clk); si = w;
      #1;
      chk({c1a, c0a} == ref_rails(w, ph), $sformatf("decode %b phase %b", w, ph));
      chk(codd1 == ph && ceven1 == !ph, "phase outputs");
      chk(so1 == ph, "so matches accepted phase");
      @(negedge clk); ci1 = 1;
      @(posedge clk); #1;
      chk({c1a, c0a} == 4'b0000, "outputs clear after acknowledge");
      chk(!codd1 && !ceven1, "phase outputs clear");
      repeat ($urandom % 3) begin
        @(posedge clk); #1; chk(so1 == ph, "so waits for ci low");
      end
      @(negedge clk); ci1 = 0;
      @(posedge clk); #1;
      chk(so1 == !ph, "so toggles after ci low");
      ph = !ph;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
