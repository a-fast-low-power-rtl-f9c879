// tb_comp72: exhaustive self-check of the 7:2 compressor.
// All 512 input patterns; checks x1..x7 + cin1 + cin2 =
// sum + 2(carry + cout2) + 4 cout1, and that the carry-outs do not depend
// on the carry inputs.
module tb_comp72;
  logic [8:0] v;
  logic sum, carry, cout1, cout2;
  logic [1:0] co_prev;
  int checks = 0, failures = 0;
  logic clk = 0;
  always #5 clk = ~clk;

  comp72 dut (.x1(v[0]), .x2(v[1]), .x3(v[2]), .x4(v[3]), .x5(v[4]),
              .x6(v[5]), .x7(v[6]), .cin1(v[7]), .cin2(v[8]),
              .sum(sum), .carry(carry), .cout1(cout1), .cout2(cout2));

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 512; i++) begin
      v = 9'(i);
      @(posedge clk);
      checks++;
      if ($countones(v) != int'(sum) + 2 * (int'(carry) + int'(cout2)) + 4 * int'(cout1)) begin
        failures++;
        $display("FAIL in=%b sum=%b carry=%b cout1=%b cout2=%b", v, sum, carry, cout1, cout2);
      end
      co_prev = {cout1, cout2};
      v[8:7] = ~v[8:7];
      @(posedge clk);
      checks++;
      if ({cout1, cout2} != co_prev) begin
        failures++;
        $display("FAIL carry-outs depend on carry inputs, in=%b", v);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
