// tb_bec: exhaustive check of the binary to excess-1 converter.
//
// Checks the 4-bit converter against the published truth-table rows and
// against b + 1 (mod 2^N) for every input, and the 3-, 5- and 6-bit
// converters used by the 16-bit carry select adder against b + 1 as well.
module tb_bec;
  int checks = 0, failures = 0;

  logic [2:0] b3, x3;
  logic [3:0] b4, x4;
  logic [4:0] b5, x5;
  logic [5:0] b6, x6;

  bec #(.N(3)) u3 (.b(b3), .x(x3));
  bec #(.N(4)) u4 (.b(b4), .x(x4));
  bec #(.N(5)) u5 (.b(b5), .x(x5));
  bec #(.N(6)) u6 (.b(b6), .x(x6));

  task automatic check(string what, logic [7:0] got, logic [7:0] exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %0h expected %0h", what, got, exp);
    end
  endtask

  // Rows of the 4-bit truth table: input -> output.
  localparam logic [3:0] TT_IN  [5] = '{4'b0000, 4'b0001, 4'b0011, 4'b0100, 4'b0101};
  localparam logic [3:0] TT_OUT [5] = '{4'b0001, 4'b0010, 4'b0100, 4'b0101, 4'b0110};

  initial begin
    #100000;
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 5; i++) begin
      b4 = TT_IN[i];
      #1 check("truth table", 8'(x4), 8'(TT_OUT[i]));
    end
    for (int i = 0; i < 64; i++) begin
      b3 = 3'(i); b4 = 4'(i); b5 = 5'(i); b6 = 6'(i);
      #1;
      if (i < 8)  check("bec3", 8'(x3), 8'((i + 1) % 8));
      if (i < 16) check("bec4", 8'(x4), 8'((i + 1) % 16));
      if (i < 32) check("bec5", 8'(x5), 8'((i + 1) % 32));
      check("bec6", 8'(x6), 8'((i + 1) % 64));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
