// tb_da_fir_top: end-to-end test of the filter at its default size
// (1024 taps, 8-bit samples, default triangular coefficients).
//
// 1300 samples are fed, enough to fill the whole delay line and run past
// it: small random values, bursts of +127 and -128 that drive the 16-bit
// output into positive and negative saturation, and full-range random
// values. Samples are sent back to back or after idle gaps, and clken is
// dropped at random for about one clock in twenty. tb_fir_checker computes
// every output directly from the coefficients and checks the value, the
// saturated 16-bit word and the latency of DATA_W clocks; the test also
// checks the throughput of one sample per DATA_W clocks while streaming and
// that every mechanism (streaming, load from idle, stall, saturation both
// ways) occurred.
module tb_da_fir_top;
  localparam int TAPS = 1024, DATA_W = 8;
  localparam int AW = 8 + $clog2(TAPS) + DATA_W;
  localparam int NSAMP = 1300;

  logic clk = 0, rst_n = 0, clken = 1, x_valid = 0, x_ready, y_valid, q_sat;
  logic signed [DATA_W-1:0] x_in = '0;
  logic signed [AW-1:0] y;
  logic signed [15:0] q;

  da_fir_top dut (.*);

  tb_fir_checker #(.TAPS(TAPS), .DATA_W(DATA_W), .AW(AW)) chk (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    chk.failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", chk.checks, chk.failures);
    $finish;
  end

  // Expected coefficients: triangular window, h(k) =
  // floor((2*min(k, TAPS-1-k) + 1) * 127 / TAPS).
  initial
    for (int k = 0; k < TAPS; k++) begin
      automatic int m = (k < TAPS - 1 - k) ? k : TAPS - 1 - k;
      chk.h[k] = ((2 * m + 1) * 127) / TAPS;
    end

  // Offer one sample and wait until the filter takes it.
  task automatic send(int v, int stall_pct);
    x_in = DATA_W'(v);
    x_valid = 1;
    forever begin
      clken = ($urandom_range(0, 99) >= stall_pct);
      #1;
      if (x_ready) break;
      @(negedge clk);
    end
    @(negedge clk);
    x_valid = 0;
  endtask

  function automatic int stimulus(int n);
    if (n >= 300 && n < 330) return 127;
    if (n >= 600 && n < 630) return -128;
    if (n >= 1000 && n < 1100) return $urandom_range(0, 255) - 128;
    return $urandom_range(0, 6) - 3;
  endfunction

  initial begin
    int t0, t1;
    repeat (3) @(negedge clk);
    rst_n = 1;
    @(negedge clk);
    for (int n = 0; n < NSAMP; n++) begin
      if (n >= 200 && n < 220) begin
        // Throughput: ten samples, streamed with clken held high.
        send(stimulus(n), 0);
        if (n == 200) t0 = int'(chk.cycle);
        if (n == 209) begin
          t1 = int'(chk.cycle);
          chk.checks++;
          if (t1 - t0 != 9 * DATA_W) begin
            chk.failures++;
            $display("FAIL 9 sample periods took %0d clocks", t1 - t0);
          end
        end
      end else begin
        send(stimulus(n), 5);
        if ($urandom_range(0, 9) == 0) begin
          clken = 1;
          repeat ($urandom_range(1, 2 * DATA_W)) @(negedge clk);
        end
      end
    end
    clken = 1;
    repeat (3 * DATA_W) @(negedge clk);
    chk.report_mechanisms();
    $display("TB_RESULT checks=%0d failures=%0d", chk.checks, chk.failures);
    $finish;
  end
endmodule
