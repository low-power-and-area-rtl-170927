// tb_ffa3_postproc: checks the post-processing network on its own.
//
// Each block draws nine random cross terms Aij (standing for Hi*Xj) and
// feeds the post-processor the six sub-filter values they imply:
//   a = A00, b = A11, q = A11+A12+A21+A22, p = sum of all nine,
//   e = A00+A02+A20+A22, f = A00-A02-A20+A22.
// The expected outputs are the three-parallel convolution identities
//   Y0 = A00 + prev(A12 + A21), Y1 = A01 + A10 + prev(A22),
//   Y2 = A11 + A02 + A20,
// where prev() is the previous accepted block. Blocks with en low must not
// advance the block delays. A reset in the middle clears them.
module tb_ffa3_postproc;
  localparam int AW = 32;
  int checks = 0, failures = 0, stalls = 0, resets = 0;

  logic clk = 0, rst_n = 0, en = 0;
  logic signed [AW-1:0] a, b, q, p, e, f, y0, y1, y2;

  ffa3_postproc u_dut (.clk, .rst_n, .en, .a, .b, .q, .p, .e, .f, .y0, .y1, .y2);

  always #5 clk = ~clk;

  task automatic check(string what, logic signed [AW-1:0] got, int exp);
    checks++;
    if (got !== AW'(exp)) begin
      failures++;
      $display("FAIL %s: got %0d expected %0d", what, got, exp);
    end
  endtask

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int prev_v, prev_t;
    int A [3][3];
    prev_v = 0; prev_t = 0;
    {a, b, q, p, e, f} = '0;
    repeat (2) @(posedge clk);
    #1 rst_n = 1;
    for (int n = 0; n < 4000; n++) begin
      if (n == 2000) begin
        rst_n = 0; #1; rst_n = 1; resets++;
        prev_v = 0; prev_t = 0;
      end
      for (int i = 0; i < 3; i++)
        for (int j = 0; j < 3; j++)
          A[i][j] = (n % 50 == 7) ? -(1 << 22) : ($signed($urandom) >>> 10);
      a = A[0][0];
      b = A[1][1];
      q = A[1][1] + A[1][2] + A[2][1] + A[2][2];
      p = A[0][0] + A[0][1] + A[0][2] + A[1][0] + A[1][1] + A[1][2] + A[2][0] + A[2][1] + A[2][2];
      e = A[0][0] + A[0][2] + A[2][0] + A[2][2];
      f = A[0][0] - A[0][2] - A[2][0] + A[2][2];
      en = ($urandom % 5) != 0;
      #1;
      check("y0", y0, A[0][0] + prev_v);
      check("y1", y1, A[0][1] + A[1][0] + prev_t);
      check("y2", y2, A[1][1] + A[0][2] + A[2][0]);
      if (en) begin
        prev_v = A[1][2] + A[2][1];
        prev_t = A[2][2];
      end else begin
        stalls++;
      end
      @(posedge clk);
      #1;
    end
    checks++;
    if (stalls == 0 || resets == 0) begin
      failures++;
      $display("FAIL stall or reset never exercised");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
