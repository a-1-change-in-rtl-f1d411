// Self-checking testbench for xbar: all 16 pairs of previous and new data
// values, in random order and several times over. The toggle request must be
// the single line numbered previous XOR new value, it must appear two clocks
// after the inputs, and it must clear after the four-phase return to zero.
module xbar_tb
  import c1c4_pkg::*;
;
  logic clk = 0, rst_n = 0;
  onehot4_t di = '0, to;
  dr_t c0 = '0, c1 = '0;
  logic ti = 0, d_ack, c_ack;
  int checks = 0, failures = 0;

  xbar dut (.clk, .rst_n, .di, .c0, .c1, .to, .ti, .d_ack, .c_ack);

  always #5 clk = ~clk;

  task automatic chk(input logic cond, input string msg);
    checks++;
    if (!cond) begin failures++; $display("FAIL: %s", msg); end
  endtask

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2) @(posedge clk);
    @(negedge clk) rst_n = 1;
    for (int n = 0; n < 160; n++) begin
      int p, d, k, lat;
      p = (n < 16) ? n / 4 : int'($urandom % 4);
      d = (n < 16) ? n % 4 : int'($urandom % 4);
      k = p ^ d;
      @(negedge clk);
      c0 = ((p & 1) != 0) ? 2'b10 : 2'b01;
      c1 = ((p & 2) != 0) ? 2'b10 : 2'b01;
      di = 4'(1 << d);
      lat = 0;
      while (to == '0 && lat < 10) begin @(posedge clk); #1; lat++; end
      chk(to == 4'(1 << k), $sformatf("prev %0d new %0d: to=%b", p, d, to));
      chk(lat == 2, $sformatf("latency %0d", lat));
      @(negedge clk); ti = 1;
      #1 chk(d_ack && c_ack, "acks");
      di = '0; c0 = '0; c1 = '0;
      lat = 0;
      while (to != '0 && lat < 10) begin @(posedge clk); #1; lat++; end
      chk(to == '0, "request cleared");
      @(negedge clk); ti = 0;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
