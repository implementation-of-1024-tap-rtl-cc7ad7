// tb_rca_adder: self-checking test of the ripple carry adder.
// A 5-bit adder is checked exhaustively (all a, b and carry-in values) and
// a 26-bit adder with random and corner operands; sum and carry out are
// compared with the integer sum a + b + cin.
module tb_rca_adder;
  logic [4:0]  a5, b5, s5;
  logic        c5, co5;
  logic [25:0] a26, b26, s26;
  logic        c26, co26;
  int checks = 0, failures = 0;

  rca_adder #(.W(5))  u5  (.a(a5),  .b(b5),  .cin(c5),  .sum(s5),  .cout(co5));
  rca_adder #(.W(26)) u26 (.a(a26), .b(b26), .cin(c26), .sum(s26), .cout(co26));

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check26(logic [25:0] x, logic [25:0] y, logic ci);
    logic [26:0] e;
    a26 = x; b26 = y; c26 = ci;
    #1;
    e = 27'(x) + 27'(y) + 27'(ci);
    checks++;
    if ({co26, s26} != e) begin
      failures++;
      $display("FAIL 26-bit %h + %h + %b = %h, exp %h", x, y, ci, {co26, s26}, e);
    end
  endtask

  initial begin
    for (int i = 0; i < 32; i++)
      for (int j = 0; j < 32; j++)
        for (int c = 0; c < 2; c++) begin
          a5 = 5'(i); b5 = 5'(j); c5 = 1'(c);
          #1;
          checks++;
          if (int'({co5, s5}) != i + j + c) begin
            failures++;
            $display("FAIL 5-bit %0d + %0d + %0d = %0d", i, j, c, {co5, s5});
          end
        end
    check26('1, 26'd0, 1'b1);
    check26('1, '1, 1'b1);
    check26(26'h2000000, 26'h2000000, 1'b0);
    check26(26'h1555555, 26'h2aaaaaa, 1'b1);
    for (int n = 0; n < 2000; n++)
      check26(26'($urandom), 26'($urandom), 1'($urandom));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
