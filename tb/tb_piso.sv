// tb_piso: self-checking test of the parallel-in serial-out sample register.
// Random words are loaded and rotated; the serial output must give the bits
// most significant first, the word must be whole again after W rotations,
// load must win over shift, and the register must hold when idle.
module tb_piso;
  localparam int W = 8;
  logic clk = 0, rst_n = 0, load = 0, shift = 0;
  logic [W-1:0] d = '0, q;
  logic sout;
  int checks = 0, failures = 0;

  piso #(.W(W)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic expect_eq(string what, int got, int exp);
    checks++;
    if (got != exp) begin
      failures++;
      $display("FAIL %s: got %0h exp %0h", what, got, exp);
    end
  endtask

  initial begin
    logic [W-1:0] w;
    @(negedge clk);
    expect_eq("reset", int'(q), 0);
    rst_n = 1;
    for (int n = 0; n < 50; n++) begin
      w = W'($urandom);
      d = w; load = 1; shift = (n % 2 == 0);  // load has priority
      @(negedge clk);
      load = 0;
      expect_eq("loaded word", int'(q), int'(w));
      for (int b = W - 1; b >= 0; b--) begin
        expect_eq("serial bit", int'(sout), int'(w[b]));
        shift = 1;
        @(negedge clk);
      end
      shift = 0;
      expect_eq("word after W rotations", int'(q), int'(w));
      @(negedge clk);
      expect_eq("hold", int'(q), int'(w));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
