// tb_csg: exhaustive self-check of the 4-bit conditional sum generator.
// For every pair of 4-bit addends and both carry-ins, the selected sum must
// equal (a + b + cin) mod 16.
module tb_csg;
  logic [3:0] a, b, s;
  logic cin;
  int checks = 0, failures = 0;
  logic clk = 0;
  always #5 clk = ~clk;

  csg #(.W(4)) dut (.g(a & b), .p(a | b), .h(a ^ b), .cin(cin), .s(s));

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 512; i++) begin
      {cin, a, b} = 9'(i);
      @(posedge clk);
      checks++;
      if (s != 4'(a + b + 4'(cin))) begin
        failures++;
        $display("FAIL a=%h b=%h cin=%b s=%h", a, b, cin, s);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
