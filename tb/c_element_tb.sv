// Self-checking testbench for c_element: random input pairs, compared with a
// reference that sets on 11, clears on 00 and holds otherwise.
module c_element_tb;
  logic clk = 0, rst_n = 0, a = 0, b = 0, y;
  int checks = 0, failures = 0;
  logic ref_y;

  c_element dut (.clk, .rst_n, .a, .b, .y);

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2) @(posedge clk);
    checks++; if (y !== 1'b0) begin failures++; $display("reset value wrong"); end
    @(negedge clk) rst_n = 1;
    ref_y = 0;
    for (int i = 0; i < 400; i++) begin
      @(negedge clk);
      a = 1'($urandom); b = 1'($urandom);
      if (a && b) ref_y = 1; else if (!a && !b) ref_y = 0;
      @(posedge clk); #1;
      checks++;
      if (y !== ref_y) begin failures++; $display("a=%b b=%b y=%b exp=%b", a, b, y, ref_y); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
