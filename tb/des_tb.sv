// Self-checking testbench for des: every 1-of-4 value with each phase signal
// state; the value must appear only on the output of its phase, and the
// acknowledge must be the OR of the two output acknowledges.
module des_tb
  import c1c4_pkg::*;
;
  onehot4_t y, out_odd, out_even;
  logic y_ack, codd, ceven, ack_odd, ack_even;
  int checks = 0, failures = 0;

  des dut (.y, .y_ack, .codd, .ceven, .out_odd, .ack_odd, .out_even, .ack_even);

  task automatic chk(input logic cond, input string msg);
    checks++;
    if (!cond) begin failures++; $display("FAIL: %s", msg); end
  endtask

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 5; v++) begin
      for (int ph = 0; ph < 3; ph++) begin
        for (int a = 0; a < 4; a++) begin
          y = (v < 4) ? 4'(1 << v) : 4'b0000;
          codd = (ph == 1); ceven = (ph == 2);
          ack_odd = a[0]; ack_even = a[1];
          #1;
          chk(out_odd == (codd ? y : 4'b0000), "odd output");
          chk(out_even == (ceven ? y : 4'b0000), "even output");
          chk(y_ack == (ack_odd || ack_even), "acknowledge");
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
