// tb_da_tap_line: self-checking test of the bit-serial delay line.
// The test plays the controller's part: it loads a sample, shifts W-1 times
// and loads the next sample on the last bit clock (streaming) or after some
// idle clocks. On every bit clock b (0 = first after the load) bits[k] must
// equal bit W-1-b of x(n-k), the sample loaded k samples earlier (zero before
// any sample, after reset).
module tb_da_tap_line;
  localparam int TAPS = 12;
  localparam int W    = 8;
  logic clk = 0, rst_n = 0, load = 0, shift = 0;
  logic [W-1:0] x_in = '0;
  logic [TAPS-1:0] bits;
  logic [W-1:0] hist [TAPS];
  int checks = 0, failures = 0, idle_gaps = 0, streamed = 0;

  da_tap_line #(.TAPS(TAPS), .W(W)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [W-1:0] nx;
    foreach (hist[k]) hist[k] = '0;
    @(negedge clk);
    rst_n = 1;
    // First load from idle.
    nx = W'($urandom);
    x_in = nx; load = 1;
    for (int n = 0; n < 200; n++) begin
      @(negedge clk);   // load took effect
      for (int k = TAPS - 1; k > 0; k--) hist[k] = hist[k-1];
      hist[0] = nx;
      load = 0;
      for (int b = 0; b < W; b++) begin
        checks++;
        for (int k = 0; k < TAPS; k++)
          if (bits[k] != hist[k][W-1-b]) begin
            failures++;
            $display("FAIL sample %0d bit clock %0d tap %0d", n, b, k);
            break;
          end
        if (b < W - 1) begin
          shift = 1;
          @(negedge clk);
          shift = 0;
        end
      end
      nx = W'($urandom);
      x_in = nx;
      if ($urandom_range(0, 2) == 0) begin
        // Idle clocks: the line must hold.
        idle_gaps++;
        repeat ($urandom_range(1, 3)) @(negedge clk);
      end else begin
        streamed++;
      end
      load = 1;
    end
    checks++;
    if (idle_gaps == 0 || streamed == 0) begin
      failures++;
      $display("FAIL idle and streaming loads not both exercised");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
