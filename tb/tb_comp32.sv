// tb_comp32: exhaustive self-check of the 3:2 compressor.
// All 8 input patterns; checks a + b + c = sum + 2 carry.
module tb_comp32;
  logic a, b, c, sum, carry;
  int checks = 0, failures = 0;
  logic clk = 0;
  always #5 clk = ~clk;

  comp32 dut (.a(a), .b(b), .c(c), .sum(sum), .carry(carry));

  initial begin
    repeat (1000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 8; v++) begin
      {a, b, c} = 3'(v);
      @(posedge clk);
      checks++;
      if (int'(a) + int'(b) + int'(c) != int'(sum) + 2 * int'(carry)) begin
        failures++;
        $display("FAIL in=%b sum=%b carry=%b", 3'(v), sum, carry);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
