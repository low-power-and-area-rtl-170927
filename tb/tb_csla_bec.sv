// tb_csla_bec: checks the improved carry select adder at 16 bits (default),
// 32 bits and 10 bits against a + b + cin, on carry-chain corner cases
// (all ones, alternating patterns, carries crossing each group boundary)
// and on random operands. It also counts how often each of the 16-bit
// adder's selecting groups took its BEC (carry-in 1) result, and fails if
// some group never did.
module tb_csla_bec;
  int checks = 0, failures = 0;

  logic [15:0] a16, b16, s16;
  logic [31:0] a32, b32, s32;
  logic [9:0]  a10, b10, s10;
  logic        ci, co16, co32, co10;

  csla_bec                u16 (.a(a16), .b(b16), .cin(ci), .sum(s16), .cout(co16));
  csla_bec #(.WIDTH(32))  u32 (.a(a32), .b(b32), .cin(ci), .sum(s32), .cout(co32));
  csla_bec #(.WIDTH(10))  u10 (.a(a10), .b(b10), .cin(ci), .sum(s10), .cout(co10));

  // Carry into groups 1..4 of the 16-bit adder (bits 2, 4, 7, 11).
  int bec_sel [1:4];

  task automatic apply(logic [31:0] a, logic [31:0] b, logic c);
    logic [16:0] e16;
    logic [32:0] e32;
    logic [10:0] e10;
    a16 = a[15:0]; b16 = b[15:0]; a32 = a; b32 = b; a10 = a[9:0]; b10 = b[9:0]; ci = c;
    #1;
    e16 = 17'(a[15:0]) + 17'(b[15:0]) + 17'(c);
    e32 = 33'(a) + 33'(b) + 33'(c);
    e10 = 11'(a[9:0]) + 11'(b[9:0]) + 11'(c);
    checks += 3;
    if ({co16, s16} !== e16) begin
      failures++; $display("FAIL csla16 %h+%h+%b = %h exp %h", a[15:0], b[15:0], c, {co16, s16}, e16);
    end
    if ({co32, s32} !== e32) begin
      failures++; $display("FAIL csla32 %h+%h+%b = %h exp %h", a, b, c, {co32, s32}, e32);
    end
    if ({co10, s10} !== e10) begin
      failures++; $display("FAIL csla10 %h+%h+%b = %h exp %h", a[9:0], b[9:0], c, {co10, s10}, e10);
    end
    // Independent carry into each group boundary.
    if (((a[1:0]  + b[1:0]  + c) >> 2) != 0) bec_sel[1]++;
    if (((32'(a[3:0])  + 32'(b[3:0])  + 32'(c)) >> 4)  != 0) bec_sel[2]++;
    if (((32'(a[6:0])  + 32'(b[6:0])  + 32'(c)) >> 7)  != 0) bec_sel[3]++;
    if (((32'(a[10:0]) + 32'(b[10:0]) + 32'(c)) >> 11) != 0) bec_sel[4]++;
  endtask

  initial begin
    #10000000;
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int g = 1; g <= 4; g++) bec_sel[g] = 0;
    apply('0, '0, 0);
    apply('1, '0, 1);
    apply('1, '1, 1);
    apply('1, 32'd1, 0);
    apply(32'hAAAA_AAAA, 32'h5555_5555, 1);
    apply(32'hAAAA_AAAA, 32'h5555_5555, 0);
    apply(32'h8000_8000, 32'h8000_8000, 0);
    // A single carry generated just below each boundary, then propagated.
    for (int k = 0; k < 32; k++) begin
      apply(32'(1) << k, (32'(1) << k) | ~((32'(1) << (k + 1)) - 1), 0);
      apply(32'(1) << k, 32'hFFFF_FFFF, 0);
      apply(~(32'(1) << k), 32'(1) << k, 1);
    end
    for (int i = 0; i < 20000; i++) apply($urandom, $urandom, 1'($urandom));
    for (int g = 1; g <= 4; g++) begin
      checks++;
      if (bec_sel[g] == 0) begin
        failures++; $display("FAIL group %0d never selected its BEC result", g);
      end
    end
    $display("BEC results selected per group: %0d %0d %0d %0d",
             bec_sel[1], bec_sel[2], bec_sel[3], bec_sel[4]);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
