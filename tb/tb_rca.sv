// tb_rca: exhaustive check of a 5-bit and a 2-bit ripple carry adder,
// including both carry-in values: {cout, sum} must equal a + b + cin.
module tb_rca;
  int checks = 0, failures = 0;

  logic [4:0] a5, b5, s5;
  logic [1:0] a2, b2, s2;
  logic       ci, co5, co2;

  rca #(.N(5)) u5 (.a(a5), .b(b5), .cin(ci), .sum(s5), .cout(co5));
  rca #(.N(2)) u2 (.a(a2), .b(b2), .cin(ci), .sum(s2), .cout(co2));

  initial begin
    #1000000;
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int c = 0; c < 2; c++)
      for (int i = 0; i < 32; i++)
        for (int j = 0; j < 32; j++) begin
          a5 = 5'(i); b5 = 5'(j); a2 = 2'(i); b2 = 2'(j); ci = 1'(c);
          #1;
          checks++;
          if ({co5, s5} !== 6'(i + j + c)) begin
            failures++;
            $display("FAIL rca5 %0d+%0d+%0d = %0d", i, j, c, {co5, s5});
          end
          if (i < 4 && j < 4) begin
            checks++;
            if ({co2, s2} !== 3'(i + j + c)) begin
              failures++;
              $display("FAIL rca2 %0d+%0d+%0d = %0d", i, j, c, {co2, s2});
            end
          end
        end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
