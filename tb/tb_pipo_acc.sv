// tb_pipo_acc: self-checking test of the shift-accumulator.
// For each operation the test feeds D random signed per-bit sums s_0..s_{D-1}
// (most significant bit first) with first on s_0 and last on s_{D-1}, and
// checks y = -s_0 * 2^(D-1) + sum_{b>0} s_b * 2^(D-1-b), y_valid for exactly
// one clock after last, q = y saturated to 16 bits with q_sat, and that y
// holds while en is low (pauses are inserted between bits).
module tb_pipo_acc;
  localparam int D = 8, SW = 18, AW = 26, OW = 16;
  logic clk = 0, rst_n = 0, en = 0, first = 0, last = 0;
  logic signed [SW-1:0] s = '0;
  logic signed [AW-1:0] y;
  logic y_valid, q_sat;
  logic signed [OW-1:0] q;
  int checks = 0, failures = 0, n_sat_pos = 0, n_sat_neg = 0, n_pause = 0;

  pipo_acc #(.SUM_W(SW), .ACC_W(AW), .OUT_W(OW)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic expect_eq(string what, longint got, longint exp);
    checks++;
    if (got != exp) begin
      failures++;
      $display("FAIL %s: got %0d exp %0d", what, got, exp);
    end
  endtask

  initial begin
    longint e, eq;
    int v;
    @(negedge clk);
    rst_n = 1;
    for (int n = 0; n < 400; n++) begin
      e = 0;
      for (int b = 0; b < D; b++) begin
        case (n % 4)
          0: v = $urandom_range(0, 2000) - 1000;           // small: fits 16 bits
          1: v = $urandom_range(0, 262143) - 131072;       // full 18-bit range
          2: v = (b == 0) ? -131072 : 0;                   // most positive result
          default: v = (b == 0) ? 0 : 131071;              // large positive
        endcase
        s = SW'(v);
        first = (b == 0); last = (b == D - 1); en = 1;
        e = (b == 0) ? -longint'(v) : 2 * e + longint'(v);
        @(negedge clk);
        en = 0; first = 0; last = 0;
        if (b < D - 1) begin
          expect_eq("no valid before last bit", y_valid, 0);
          if ($urandom_range(0, 3) == 0) begin
            n_pause++;
            @(negedge clk);
          end
        end
      end
      eq = (e > 32767) ? 32767 : (e < -32768) ? -32768 : e;
      if (e > 32767) n_sat_pos++;
      if (e < -32768) n_sat_neg++;
      expect_eq("y_valid", y_valid, 1);
      expect_eq("y", y, e);
      expect_eq("q", q, eq);
      expect_eq("q_sat", q_sat, (eq != e));
      @(negedge clk);
      expect_eq("y_valid one clock", y_valid, 0);
      expect_eq("y holds", y, e);
    end
    checks++;
    if (n_sat_pos == 0 || n_sat_neg == 0 || n_pause == 0) begin
      failures++;
      $display("FAIL saturation or pause never exercised");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
