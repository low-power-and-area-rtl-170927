// tb_fir_subfilter: checks the three sub-filter forms (general, symmetric,
// antisymmetric) at M = 9 and a symmetric one at M = 1 against a direct
// convolution of the accepted samples with the full coefficient set.
// Inputs are random, with random clock cycles where en is low (the filter
// must hold its state), and one reset in the middle of the run, after
// which the history must start from zero again. The output is
// combinational, so it is compared in the same cycle the sample is applied.
module tb_fir_subfilter;
  import fir_pkg::*;

  localparam int M  = 9;
  localparam int NS = (M + 1) / 2;
  localparam int IW = 8;
  localparam int CWD = 8;
  localparam int AW = 32;

  int checks = 0, failures = 0, stalls = 0, resets = 0;

  logic clk = 0, rst_n = 0, en = 0;
  logic signed [IW-1:0]  x;
  logic signed [CWD-1:0] cg [M];
  logic signed [CWD-1:0] cs [NS];
  logic signed [CWD-1:0] ca [NS];
  logic signed [CWD-1:0] c1 [1];
  logic signed [AW-1:0]  yg, ys, ya, y1;

  fir_subfilter #(.M(M), .KIND(SUB_GENERAL),       .IN_W(IW), .C_W(CWD), .ACC_W(AW)) ug (.clk, .rst_n, .en, .x, .coef(cg), .y(yg));
  fir_subfilter #(.M(M), .KIND(SUB_SYMMETRIC),     .IN_W(IW), .C_W(CWD), .ACC_W(AW)) us (.clk, .rst_n, .en, .x, .coef(cs), .y(ys));
  fir_subfilter #(.M(M), .KIND(SUB_ANTISYMMETRIC), .IN_W(IW), .C_W(CWD), .ACC_W(AW)) ua (.clk, .rst_n, .en, .x, .coef(ca), .y(ya));
  fir_subfilter #(.M(1), .KIND(SUB_SYMMETRIC),     .IN_W(IW), .C_W(CWD), .ACC_W(AW)) u1 (.clk, .rst_n, .en, .x, .coef(c1), .y(y1));

  always #5 clk = ~clk;

  // Full tap sets for the reference.
  int fg [M], fs [M], fa [M];
  int hist [M];   // accepted samples, hist[0] = most recent

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
    for (int m = 0; m < M; m++) cg[m] = CWD'($urandom);
    for (int m = 0; m < NS; m++) begin
      cs[m] = CWD'($urandom);
      ca[m] = (m == NS - 1) ? '0 : CWD'($urandom);   // middle tap is zero
    end
    c1[0] = CWD'($urandom);
    for (int m = 0; m < M; m++) begin
      fg[m] = int'(cg[m]);
      fs[m] = (m < NS) ? int'(cs[m]) : int'(cs[M-1-m]);
      fa[m] = (m < NS) ? int'(ca[m]) : -int'(ca[M-1-m]);
      hist[m] = 0;
    end
    x = '0;
    repeat (3) @(posedge clk);
    #1 rst_n = 1;

    for (int n = 0; n < 3000; n++) begin
      int eg, es, ea;
      if (n == 1500) begin
        // Reset in the middle: history restarts from zero.
        rst_n = 0; #1; rst_n = 1; resets++;
        for (int m = 0; m < M; m++) hist[m] = 0;
      end
      en = ($urandom % 4) != 0;
      x  = (n % 97 == 5) ? IW'(-128) : IW'($urandom);
      #1;
      eg = fg[0] * int'(x); es = fs[0] * int'(x); ea = fa[0] * int'(x);
      for (int m = 1; m < M; m++) begin
        eg += fg[m] * hist[m-1];
        es += fs[m] * hist[m-1];
        ea += fa[m] * hist[m-1];
      end
      check("general", yg, eg);
      check("symmetric", ys, es);
      check("antisymmetric", ya, ea);
      check("length-1", y1, int'(c1[0]) * int'(x));
      if (en) begin
        for (int m = M - 1; m > 0; m--) hist[m] = hist[m-1];
        hist[0] = int'(x);
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
    $display("stalls=%0d resets=%0d", stalls, resets);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
