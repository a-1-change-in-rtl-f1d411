// Self-checking testbench for xbar_cell: for every data line and control value
// runs a four-phase handshake, checks which output rises (straight or swapped),
// that the output holds while only part of the inputs has cleared, that it
// clears once all are low, and that the acknowledges follow ti.
module xbar_cell_tb
  import c1c4_pkg::*;
;
  logic clk = 0, rst_n = 0;
  logic [1:0] di = '0, to;
  dr_t c = '0;
  logic ti = 0, d_ack, c_ack;
  int checks = 0, failures = 0;

  xbar_cell dut (.clk, .rst_n, .di, .c, .to, .ti, .d_ack, .c_ack);

  always #5 clk = ~clk;

  task automatic chk(input logic cond, input string msg);
    checks++;
    if (!cond) begin failures++; $display("FAIL: %s", msg); end
  endtask

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2) @(posedge clk);
    @(negedge clk) rst_n = 1;
    @(posedge clk); #1;
    chk(to == 2'b00, "reset");
    for (int rep = 0; rep < 8; rep++) begin
      for (int line = 0; line < 2; line++) begin
        for (int sw = 0; sw < 2; sw++) begin
          int exp_out;
          exp_out = line ^ sw;
          @(negedge clk);
          // control first or data first, at random
          if ($urandom % 2 == 1) begin
            c = (sw != 0) ? 2'b10 : 2'b01;
            @(negedge clk);
            chk(to == 2'b00, "output rose on control alone");
            di = 2'(1 << line);
          end else begin
            di = 2'(1 << line);
            @(negedge clk);
            chk(to == 2'b00, "output rose on data alone");
            c = (sw != 0) ? 2'b10 : 2'b01;
          end
          @(posedge clk); #1;
          chk(to == 2'(1 << exp_out), $sformatf("line %0d sw %0d -> %b", line, sw, to));
          @(negedge clk); ti = 1;
          #1 chk(d_ack && c_ack, "acks follow ti");
          // withdraw the data only: output must hold
          di = '0;
          @(posedge clk); #1;
          chk(to == 2'(1 << exp_out), "output held with control still valid");
          @(negedge clk); c = '0;
          @(posedge clk); #1;
          chk(to == 2'b00, "output cleared");
          @(negedge clk); ti = 0;
          #1 chk(!d_ack && !c_ack, "acks low");
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
