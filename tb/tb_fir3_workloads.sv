// tb_fir3_workloads: runs the filter at the three lengths of the published
// comparison, 9, 27 and 81 taps, each against a direct convolution (see
// fir3_driver), and checks the structure's multiplier and adder counts:
//   27 taps: 38 multipliers, 63 adders
//   81 taps: 110 multipliers, 171 adders
//    9 taps: 14 multipliers, 27 adders (no published figure; from
//            6 sub-filters of 3 taps, four of them sharing multipliers,
//            plus 15 pre/post-processing adders).
// It also counts, per length, the clocks in which a carry select adder of
// the post-processor (the one forming Y1) took the BEC result in at least
// one of its groups, and fails if that never happened.
module tb_fir3_workloads;
  localparam int DW = 8, CW = 8, AW = 32;

  logic clk = 0;
  always #5 clk = ~clk;

  localparam int NL [3] = '{9, 27, 81};
  localparam int EXP_MULT [3] = '{14, 38, 110};
  localparam int EXP_ADD  [3] = '{27, 63, 171};

  int checks [3], failures [3], stalls [3], resets [3], blocks [3], carried [3];
  logic done [3];
  int mult [3], add [3];
  int bec_used [3] = '{0, 0, 0};

  for (genvar g = 0; g < 3; g++) begin : g_len
    localparam int N = NL[g];
    logic rst_n, in_valid, out_valid;
    logic signed [DW-1:0] x [3];
    logic signed [CW-1:0] h_half [(N+1)/2];
    logic signed [AW-1:0] y [3];

    fir3_sym_ffa #(.N(N), .DW(DW), .CW(CW), .AW(AW)) dut (
      .clk, .rst_n, .in_valid, .x, .h_half, .out_valid, .y
    );

    fir3_driver #(.N(N), .DW(DW), .CW(CW), .AW(AW), .BLOCKS(400)) drv (
      .clk, .rst_n, .in_valid, .x, .h_half, .out_valid, .y,
      .done(done[g]), .checks(checks[g]), .failures(failures[g]),
      .stalls(stalls[g]), .resets(resets[g]), .blocks(blocks[g]), .carried(carried[g])
    );

    always @(posedge clk)
      if (in_valid && dut.u_post.u_y1.carry[dut.u_post.u_y1.NG-1:1] != 0) bec_used[g]++;

    assign mult[g] = dut.NUM_MULT;
    assign add[g]  = dut.NUM_ADD;
  end

  initial begin
    repeat (200000) @(posedge clk);
    $display("FAIL watchdog");
    $display("TB_RESULT checks=1 failures=1");
    $finish;
  end

  initial begin
    int c, f;
    @(posedge clk);
    wait (done[0] && done[1] && done[2]);
    c = 0; f = 0;
    for (int g = 0; g < 3; g++) begin
      c += checks[g] + 2;
      f += failures[g];
      if (mult[g] != EXP_MULT[g]) begin
        f++; $display("FAIL N=%0d: %0d multipliers, expected %0d", NL[g], mult[g], EXP_MULT[g]);
      end
      if (add[g] != EXP_ADD[g]) begin
        f++; $display("FAIL N=%0d: %0d adders, expected %0d", NL[g], add[g], EXP_ADD[g]);
      end
      c++;
      if (stalls[g] == 0 || carried[g] == 0 || bec_used[g] == 0) begin
        f++; $display("FAIL N=%0d: stalls, block delays or BEC selection not exercised", NL[g]);
      end
      $display("N=%0d: %0d multipliers, %0d adders, %0d blocks checked, %0d failures, BEC selected in %0d clocks",
               NL[g], mult[g], add[g], blocks[g], failures[g], bec_used[g]);
    end
    $display("TB_RESULT checks=%0d failures=%0d", c, f);
    $finish;
  end
endmodule
