// fir3_driver: stimulus and reference model for the three-parallel
// symmetric FIR filter, shared by the end-to-end testbenches.
//
// It drives a filter of length N through three phases:
//   0. worst case: every coefficient and every sample at the most negative
//      value, so each output reaches its largest magnitude;
//   1. random symmetric coefficients and random samples with random stall
//      cycles (in_valid low), a reset in the middle of the stream;
//   2. an impulse, which must bring the coefficients back out in order.
// Every accepted block is checked against a direct convolution
//   y(n) = sum_{i=0}^{N-1} h(i) x(n-i)
// over the accepted sample stream (zero before the last reset), one clock
// after the block was applied, and out_valid must follow in_valid by exactly
// one clock. It also counts the accepted blocks whose previous block was
// non-zero, i.e. where the filter's block delays carry a value. The filter itself is instantiated by the testbench, so the same
// driver serves every filter length.
module fir3_driver #(
  parameter int N      = 81,
  parameter int DW     = 8,
  parameter int CW     = 8,
  parameter int AW     = 32,
  parameter int BLOCKS = 600
) (
  input  logic                 clk,
  output logic                 rst_n,
  output logic                 in_valid,
  output logic signed [DW-1:0] x      [3],
  output logic signed [CW-1:0] h_half [(N+1)/2],
  input  logic                 out_valid,
  input  logic signed [AW-1:0] y      [3],
  output logic                 done,
  output int                   checks,
  output int                   failures,
  output int                   stalls,
  output int                   resets,
  output int                   blocks,
  output int                   carried
);

  localparam int NH = (N + 1) / 2;

  int h [N];
  int hist [$];   // accepted samples, most recent first

  function automatic int ref_y(int j);
    // Output for phase j of the block now on x (not yet in hist).
    int acc = 0;
    for (int i = 0; i < N; i++) begin
      int back = i - j;   // how far before x[0] of this block
      int s;
      if (back <= 0) s = int'(x[-back]);
      else s = (back - 1 < hist.size()) ? hist[back-1] : 0;
      acc += h[i] * s;
    end
    return acc;
  endfunction

  task automatic set_coefs(int mode);
    for (int i = 0; i < NH; i++) begin
      h_half[i] = (mode == 0) ? CW'(-(1 << (CW - 1))) : CW'($urandom);
    end
    for (int i = 0; i < N; i++) h[i] = int'(h_half[(i < NH) ? i : N - 1 - i]);
  endtask

  task automatic do_reset();
    rst_n = 1'b0;
    in_valid = 1'b0;
    @(posedge clk);
    #1;
    checks++;
    if (out_valid !== 1'b0) begin
      failures++;
      $display("FAIL out_valid high during reset");
    end
    rst_n = 1'b1;
    hist.delete();
    resets++;
  endtask

  // Apply one block (or a stall) and check the registered result.
  task automatic step(logic v, int s0, int s1, int s2);
    int e [3];
    x[0] = DW'(s0); x[1] = DW'(s1); x[2] = DW'(s2);
    in_valid = v;
    for (int j = 0; j < 3; j++) e[j] = ref_y(j);
    @(posedge clk);
    #1;
    checks++;
    if (out_valid !== v) begin
      failures++;
      $display("FAIL out_valid=%0b one clock after in_valid=%0b", out_valid, v);
    end
    if (v) begin
      // The block delays matter when the previous block was non-zero.
      if (hist.size() >= 3 && (hist[0] != 0 || hist[1] != 0 || hist[2] != 0)) carried++;
      for (int j = 0; j < 3; j++) begin
        checks++;
        if (y[j] !== AW'(e[j])) begin
          failures++;
          if (failures < 20)
            $display("FAIL N=%0d block %0d y(3k+%0d) = %0d expected %0d", N, blocks, j, y[j], e[j]);
        end
      end
      // x(3k) is oldest in the block, x(3k+2) newest.
      hist.push_front(int'(x[0]));
      hist.push_front(int'(x[1]));
      hist.push_front(int'(x[2]));
      while (hist.size() > N) void'(hist.pop_back());
      blocks++;
    end else begin
      stalls++;
    end
  endtask

  initial begin
    int mn;
    done = 0; checks = 0; failures = 0; stalls = 0; resets = 0; blocks = 0; carried = 0;
    rst_n = 0; in_valid = 0;
    x[0] = '0; x[1] = '0; x[2] = '0;
    mn = -(1 << (DW - 1));
    set_coefs(0);
    @(posedge clk);
    do_reset();

    // Phase 0: worst-case magnitude.
    for (int k = 0; k < N / 3 + 4; k++) step(1'b1, mn, mn, mn);

    // Phase 1: random coefficients and samples, stalls, mid-stream reset.
    set_coefs(1);
    do_reset();
    for (int k = 0; k < BLOCKS; k++) begin
      if (k == BLOCKS / 2) do_reset();
      step(($urandom % 4) != 0, $urandom, $urandom, $urandom);
    end

    // Phase 2: impulse response.
    do_reset();
    step(1'b1, 1, 0, 0);
    for (int k = 0; k < N / 3 + 2; k++) step(1'b1, 0, 0, 0);

    done = 1;
  end

endmodule
