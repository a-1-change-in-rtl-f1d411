// Self-checking testbench for the 1c4 receiver. A sender model answers every
// change of wi by flipping the line chosen by the coding rule (previous value
// XOR new value); a consumer acknowledges each 1-of-4 output after a random
// delay. Checks: the values come out in order, the start-up word is ignored,
// codd/ceven alternate starting with odd, and at most one value is pending.
module receiver_tb
  import c1c4_pkg::*;
;
  logic clk = 0, rst_n = 0;
  code_t wo = '0;
  logic wi, y_ack = 0, codd, ceven;
  onehot4_t y;
  int checks = 0, failures = 0, busy_ahead = 0;
  logic [1:0] sent [$];
  localparam int N = 400;

  receiver dut (.clk, .rst_n, .wo, .wi, .y, .y_ack, .codd, .ceven);

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

  // sender model
  initial begin
    @(negedge clk); @(negedge clk) rst_n = 1;
    for (int n = 0; n < N; n++) begin
      logic [1:0] p, v;
      while ((^wo) == wi) @(negedge clk);
      repeat ($urandom % 4) @(negedge clk);
      v = 2'($urandom);
      p = {wo[2] ^ wo[3], wo[1] ^ wo[3]};
      sent.push_back(v);
      wo = wo ^ code_t'(1 << (p ^ v));
    end
  end

  // consumer
  initial begin
    logic ph;
    ph = 1;
    @(negedge clk); @(negedge clk);
    repeat (3) begin @(posedge clk); #1; if (wo == 0) chk(y == '0, "start-up word ignored"); end
    for (int n = 0; n < N; n++) begin
      int w;
      w = 0;
      while (y == '0 && w < 100) begin @(posedge clk); #1; w++; end
      chk($onehot(y), "1-of-4 output");
      chk(sent.size() > 0 && y == 4'(1 << sent[0]), $sformatf("value %0d: y=%b", n, y));
      chk(codd == ph && ceven == !ph, "phase signals alternate");
      void'(sent.pop_front());
      repeat ($urandom % 6) @(negedge clk);
      if (sent.size() > 0) busy_ahead++;
      @(negedge clk) y_ack = 1;
      @(posedge clk); #1;
      chk(y == '0 && !codd && !ceven, "output clears after acknowledge");
      @(negedge clk) y_ack = 0;
      ph = !ph;
    end
    chk(busy_ahead > 0, "next word arrived while decoding");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
