// tb_comp52: exhaustive self-check of the 5:2 compressor.
// All 128 input patterns; checks x1..x5 + cin1 + cin2 =
// sum + 2(carry + cout1 + cout2), cout1 = majority(x1,x2,x3) and that
// neither carry-out depends on cin2.
module tb_comp52;
  logic [6:0] v;
  logic sum, carry, cout1, cout2;
  logic [1:0] co_prev;
  int checks = 0, failures = 0;
  logic clk = 0;
  always #5 clk = ~clk;

  comp52 dut (.x1(v[0]), .x2(v[1]), .x3(v[2]), .x4(v[3]), .x5(v[4]),
              .cin1(v[5]), .cin2(v[6]),
              .sum(sum), .carry(carry), .cout1(cout1), .cout2(cout2));

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 128; i++) begin
      v = 7'(i);
      @(posedge clk);
      checks++;
      if ($countones(v) != int'(sum) + 2 * (int'(carry) + int'(cout1) + int'(cout2))) begin
        failures++;
        $display("FAIL in=%b sum=%b carry=%b cout1=%b cout2=%b", v, sum, carry, cout1, cout2);
      end
      checks++;
      if (cout1 != ((v[0] & v[1]) | (v[0] & v[2]) | (v[1] & v[2]))) begin
        failures++;
        $display("FAIL cout1 in=%b", v);
      end
      co_prev = {cout1, cout2};
      v[6] = ~v[6];
      @(posedge clk);
      checks++;
      if ({cout1, cout2} != co_prev) begin
        failures++;
        $display("FAIL carry-outs depend on cin2, in=%b", v);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
