// tb_da_adder_tree: self-checking test of the adder tree.
// A 256-input tree of 10-bit signed words (the filter's size) and a 5-input
// tree (not a power of two) get random and extreme inputs; the output is
// compared with the integer sum of the inputs.
module tb_da_adder_tree;
  logic signed [9:0]  w256 [256];
  logic signed [17:0] s256;
  logic signed [9:0]  w5 [5];
  logic signed [12:0] s5;
  int checks = 0, failures = 0;

  da_adder_tree #(.N(256), .IN_W(10)) u256 (.in_words(w256), .sum(s256));
  da_adder_tree #(.N(5),   .IN_W(10)) u5   (.in_words(w5),   .sum(s5));

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic run(int mode);
    int e256 = 0, e5 = 0;
    for (int i = 0; i < 256; i++) begin
      case (mode)
        0: w256[i] = 10'($urandom);
        1: w256[i] = -10'sd512;
        2: w256[i] = 10'sd511;
        default: w256[i] = 10'($urandom_range(0, 3)) - 10'sd2;
      endcase
      e256 += w256[i];
    end
    for (int i = 0; i < 5; i++) begin
      w5[i] = (mode == 1) ? -10'sd512 : 10'($urandom);
      e5 += w5[i];
    end
    #1;
    checks += 2;
    if (int'(s256) != e256) begin
      failures++;
      $display("FAIL N=256 mode %0d: got %0d exp %0d", mode, s256, e256);
    end
    if (int'(s5) != e5) begin
      failures++;
      $display("FAIL N=5 mode %0d: got %0d exp %0d", mode, s5, e5);
    end
  endtask

  initial begin
    run(1);
    run(2);
    for (int n = 0; n < 300; n++) run(n % 4 == 0 ? 3 : 0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
