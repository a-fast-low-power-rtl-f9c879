// tb_ieac_sparse_carry: self-check of the sparse carry network at n = 16,
// K = 4. For random and corner operands the carry into bits 0, 4, 8, 12 is
// compared with the carries of the integer sum A + B + NOT(cout), cout being
// the carry-out of A + B.
module tb_ieac_sparse_carry;
  localparam int N = 16;
  localparam int K = 4;
  logic [N-1:0] a, b;
  logic [N/K-1:0] cblk, exp_c;
  int checks = 0, failures = 0;
  logic clk = 0;
  always #5 clk = ~clk;

  ieac_sparse_carry #(.N(N), .K(K)) dut (.g(a & b), .p(a | b), .cblk(cblk));

  initial begin
    repeat (30000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic cin;
    for (int i = 0; i < 20000; i++) begin
      a = N'($urandom);
      case (i)
        0: begin a = '0; b = '0; end
        1: begin a = '1; b = '1; end
        2: b = ~a;
        default: b = (i % 5 == 0) ? ~a ^ N'(1 << ($urandom % N)) : N'($urandom);
      endcase
      @(posedge clk);
      cin = ~((32'(a) + 32'(b)) >> N);
      for (int bl = 0; bl < N / K; bl++) begin
        logic [31:0] lo;
        lo = (32'(a) & ((32'd1 << (bl * K)) - 1)) + (32'(b) & ((32'd1 << (bl * K)) - 1)) + 32'(cin);
        exp_c[bl] = lo[bl * K];
      end
      checks++;
      if (cblk != exp_c) begin
        failures++;
        $display("FAIL a=%h b=%h cblk=%b exp=%b", a, b, cblk, exp_c);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
