// tb_modmul_ppgen: self-check of partial product generation at n = 16
// (default), 4 and 8. See ppgen_chk for the identity checked. Every operand
// class must occur at every size. The n = 8 rows for 119 x 87 are also
// compared with the published 9 x 8 matrix of that example.
module tb_modmul_ppgen;
  logic clk = 0;
  always #5 clk = ~clk;

  logic d16, d4, d8;
  int c16, c4, c8, f16, f4, f8;
  int k16 [4], k4 [4], k8 [4];
  int checks, failures;

  ppgen_chk #(.N(16), .NVEC(20000)) u16 (.clk(clk), .done(d16), .checks(c16), .failures(f16), .n_cls(k16));
  ppgen_chk #(.N(4),  .NVEC(5000))  u4  (.clk(clk), .done(d4),  .checks(c4),  .failures(f4),  .n_cls(k4));
  ppgen_chk #(.N(8),  .NVEC(20000)) u8  (.clk(clk), .done(d8),  .checks(c8),  .failures(f8),  .n_cls(k8));

  // Worked example: 119 x 87, n = 8.
  logic [8:0]      ex_x = 9'd119, ex_y = 9'd87;
  logic [8:0][7:0] ex_pp;
  modmul_ppgen #(.N(8)) u_ex (.x(ex_x), .y(ex_y), .pp(ex_pp));
  // Rows of the published matrix, row 0 first, MSB on the left.
  localparam logic [7:0] EX_ROWS [9] = '{
    8'b01110111, 8'b11101111, 8'b11011110, 8'b00000111, 8'b01111000,
    8'b00011111, 8'b11100010, 8'b01111111, 8'b00000010};

  initial begin
    repeat (100000) @(posedge clk);
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", c16 + c4 + c8, f16 + f4 + f8 + 1);
    $finish;
  end

  initial begin
    @(posedge clk);
    wait (d16 && d4 && d8);
    checks   = c16 + c4 + c8;
    failures = f16 + f4 + f8;
    for (int c = 0; c < 4; c++) begin
      if (k16[c] == 0 || k4[c] == 0 || k8[c] == 0) begin
        failures++;
        $display("FAIL operand class %0d never occurred", c);
      end
    end
    for (int j = 0; j < 9; j++) begin
      checks++;
      if (ex_pp[j] != EX_ROWS[j]) begin
        failures++;
        $display("FAIL example row %0d = %b, expected %b", j, ex_pp[j], EX_ROWS[j]);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
