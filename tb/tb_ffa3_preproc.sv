// tb_ffa3_preproc: checks the four pre-processing sums (X1+X2, X0+X2,
// X0-X2, X0+X1+X2) for all sign extremes and for random samples, at the
// default 8-bit sample width.
module tb_ffa3_preproc;
  localparam int DW = 8;
  int checks = 0, failures = 0;

  logic signed [DW-1:0] x0, x1, x2;
  logic signed [DW:0]   x12, x02p, x02m;
  logic signed [DW+1:0] x012;

  ffa3_preproc u_dut (.x0, .x1, .x2, .x12, .x02p, .x02m, .x012);

  task automatic check(string what, int got, int exp);
    checks++;
    if (got != exp) begin
      failures++;
      $display("FAIL %s: x=(%0d,%0d,%0d) got %0d expected %0d", what, x0, x1, x2, got, exp);
    end
  endtask

  task automatic apply(int a, int b, int c);
    x0 = DW'(a); x1 = DW'(b); x2 = DW'(c);
    #1;
    check("x1+x2", int'(x12), int'(x1) + int'(x2));
    check("x0+x2", int'(x02p), int'(x0) + int'(x2));
    check("x0-x2", int'(x02m), int'(x0) - int'(x2));
    check("x0+x1+x2", int'(x012), int'(x0) + int'(x1) + int'(x2));
  endtask

  localparam int EXT [4] = '{-128, -1, 0, 127};

  initial begin
    #1000000;
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 4; i++)
      for (int j = 0; j < 4; j++)
        for (int k = 0; k < 4; k++) apply(EXT[i], EXT[j], EXT[k]);
    for (int n = 0; n < 5000; n++) apply($urandom, $urandom, $urandom);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
