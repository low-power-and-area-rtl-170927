// tb_fir3_sym_ffa: end-to-end test of the filter at its default size
// (81 taps, 8-bit samples and coefficients, 32-bit outputs).
//
// fir3_driver supplies worst-case, random and impulse stimulus with stalls
// and resets, and checks every output block against a direct convolution,
// including the one-clock latency. This testbench counts how often each
// mechanism of the design was exercised: stalls, resets and the block
// delays (z^-3) carrying a non-zero value into the next block. A mechanism
// that never happened counts as a failure.
module tb_fir3_sym_ffa;
  localparam int N = 81, DW = 8, CW = 8, AW = 32;

  logic clk = 0;
  logic rst_n, in_valid, out_valid, done;
  logic signed [DW-1:0] x [3];
  logic signed [CW-1:0] h_half [(N+1)/2];
  logic signed [AW-1:0] y [3];
  int checks, failures, stalls, resets, blocks, carried;
  int extra_checks = 0, extra_failures = 0;

  always #5 clk = ~clk;

  fir3_sym_ffa dut (.clk, .rst_n, .in_valid, .x, .h_half, .out_valid, .y);

  fir3_driver #(.N(N), .DW(DW), .CW(CW), .AW(AW), .BLOCKS(600)) drv (
    .clk, .rst_n, .in_valid, .x, .h_half, .out_valid, .y,
    .done, .checks, .failures, .stalls, .resets, .blocks, .carried
  );

  task automatic count(string what, int n);
    extra_checks++;
    if (n == 0) begin
      extra_failures++;
      $display("FAIL mechanism never exercised: %s", what);
    end
    $display("  %-40s %0d", what, n);
  endtask

  initial begin
    repeat (200000) @(posedge clk);
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks + extra_checks, failures + extra_failures + 1);
    $finish;
  end

  initial begin
    @(posedge clk);
    wait (done);
    $display("N=%0d: %0d blocks checked", N, blocks);
    count("stall cycles (in_valid low)", stalls);
    count("resets", resets);
    count("blocks using the block delays", carried);
    $display("TB_RESULT checks=%0d failures=%0d", checks + extra_checks, failures + extra_failures);
    $finish;
  end
endmodule
