// tb_modmul_sizes: the multiplier at every word size of the published area
// and delay comparisons, n = 4, 8, 12, 16, 20, 24, 28 and 32.
//
// n = 4 and n = 8 are checked exhaustively (all 17^2 and 257^2 legal operand
// pairs); the other sizes with corner and 30000 random pairs each. Every size
// must also see all operand classes, a result of 2^n and both end-around
// carry values. Finally the worked example 119 x 87 mod 257 = 73 is applied
// to an n = 8 multiplier and the reduction array's sum and carry vectors are
// compared with the published intermediate values 212 and 117.
module tb_modmul_sizes;
  logic clk = 0;
  always #5 clk = ~clk;

  localparam int NS = 8;
  logic d [NS];
  int   c [NS], f [NS], t [NS];
  int   k [NS][4];
  int   e [NS][2];

  top_chk #(.N(4),  .EXH(1))        u4  (.clk(clk), .done(d[0]), .checks(c[0]), .failures(f[0]), .n_cls(k[0]), .n_top(t[0]), .n_eac(e[0]));
  top_chk #(.N(8),  .EXH(1))        u8  (.clk(clk), .done(d[1]), .checks(c[1]), .failures(f[1]), .n_cls(k[1]), .n_top(t[1]), .n_eac(e[1]));
  top_chk #(.N(12), .NVEC(30000))   u12 (.clk(clk), .done(d[2]), .checks(c[2]), .failures(f[2]), .n_cls(k[2]), .n_top(t[2]), .n_eac(e[2]));
  top_chk #(.N(16), .NVEC(30000))   u16 (.clk(clk), .done(d[3]), .checks(c[3]), .failures(f[3]), .n_cls(k[3]), .n_top(t[3]), .n_eac(e[3]));
  top_chk #(.N(20), .NVEC(30000))   u20 (.clk(clk), .done(d[4]), .checks(c[4]), .failures(f[4]), .n_cls(k[4]), .n_top(t[4]), .n_eac(e[4]));
  top_chk #(.N(24), .NVEC(30000))   u24 (.clk(clk), .done(d[5]), .checks(c[5]), .failures(f[5]), .n_cls(k[5]), .n_top(t[5]), .n_eac(e[5]));
  top_chk #(.N(28), .NVEC(30000))   u28 (.clk(clk), .done(d[6]), .checks(c[6]), .failures(f[6]), .n_cls(k[6]), .n_top(t[6]), .n_eac(e[6]));
  top_chk #(.N(32), .NVEC(30000))   u32 (.clk(clk), .done(d[7]), .checks(c[7]), .failures(f[7]), .n_cls(k[7]), .n_top(t[7]), .n_eac(e[7]));

  // Worked example, n = 8.
  logic [8:0] ex_x = 9'd119, ex_y = 9'd87, ex_r;
  modmul_top #(.N(8)) u_ex (.x(ex_x), .y(ex_y), .r(ex_r));

  function automatic int total(int a [NS]);
    int s = 0;
    for (int i = 0; i < NS; i++) s += a[i];
    return s;
  endfunction

  initial begin
    repeat (200000) @(posedge clk);
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", total(c), total(f) + 1);
    $finish;
  end

  initial begin
    int checks, failures;
    @(posedge clk);
    for (int i = 0; i < NS; i++) wait (d[i]);
    checks   = total(c);
    failures = total(f);
    for (int i = 0; i < NS; i++) begin
      $display("n=%0d: checks=%0d failures=%0d results 2^n=%0d", 4 * (i + 1), c[i], f[i], t[i]);
      for (int cl = 0; cl < 4; cl++)
        if (k[i][cl] == 0) begin failures++; $display("FAIL n=%0d class %0d unused", 4 * (i + 1), cl); end
      if (t[i] == 0) begin failures++; $display("FAIL n=%0d no result 2^n", 4 * (i + 1)); end
      if (e[i][0] == 0 || e[i][1] == 0) begin failures++; $display("FAIL n=%0d end-around carry", 4 * (i + 1)); end
    end
    checks += 3;
    if (ex_r != 9'd73) begin failures++; $display("FAIL example r=%0d", ex_r); end
    if (u_ex.vs != 8'd212) begin failures++; $display("FAIL example sum vector %0d", u_ex.vs); end
    if (u_ex.vc != 8'd117) begin failures++; $display("FAIL example carry vector %0d", u_ex.vc); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
