// tb_comp42: exhaustive self-check of the 4:2 compressor.
// All 32 input patterns; checks x1+x2+x3+x4+cin = sum + 2(carry+cout) and
// that cout does not depend on cin (no sideways ripple).
module tb_comp42;
  logic [4:0] v;
  logic sum, carry, cout, cout_other;
  int checks = 0, failures = 0;
  logic clk = 0;
  always #5 clk = ~clk;

  comp42 dut (.x1(v[0]), .x2(v[1]), .x3(v[2]), .x4(v[3]), .cin(v[4]),
              .sum(sum), .carry(carry), .cout(cout));

  initial begin
    repeat (1000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 32; i++) begin
      v = 5'(i);
      @(posedge clk);
      checks++;
      if ($countones(v) != int'(sum) + 2 * (int'(carry) + int'(cout))) begin
        failures++;
        $display("FAIL in=%b sum=%b carry=%b cout=%b", v, sum, carry, cout);
      end
      cout_other = cout;
      v[4] = ~v[4];
      @(posedge clk);
      checks++;
      if (cout != cout_other) begin
        failures++;
        $display("FAIL cout depends on cin, in=%b", v);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
