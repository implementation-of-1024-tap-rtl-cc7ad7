// tb_da_fir_small: end-to-end test of a 16-tap filter with random signed
// coefficients, including the extremes -128 and 127.
//
// Complements the full-size test, whose default coefficients are all
// positive: here negative coefficients and full-range samples (-128 .. 127)
// exercise the sign handling of the lookup tables and of the accumulator.
// 3000 samples are fed with random idle gaps and clken stalls, and the
// filter is reset once in the middle of the run (the delay line must then
// hold zeros). tb_fir_checker checks every output and its latency.
module tb_da_fir_small;
  localparam int TAPS = 16, DATA_W = 8;
  localparam int AW = 8 + $clog2(TAPS) + DATA_W;

  function automatic da_fir_pkg::coef_array_t make_coefs();
    da_fir_pkg::coef_array_t c;
    foreach (c[k]) c[k] = '0;
    // Fixed pseudo-random set: c(k) = ((k * 97 + 41) mod 256) - 128,
    // with the extremes forced at taps 3 and 10.
    for (int k = 0; k < TAPS; k++) c[k] = 8'(((k * 97 + 41) % 256) - 128);
    c[3]  = -8'sd128;
    c[10] = 8'sd127;
    return c;
  endfunction
  localparam da_fir_pkg::coef_array_t C = make_coefs();

  logic clk = 0, rst_n = 0, clken = 1, x_valid = 0, x_ready, y_valid, q_sat;
  logic signed [DATA_W-1:0] x_in = '0;
  logic signed [AW-1:0] y;
  logic signed [15:0] q;
  int n_reset = 0;

  da_fir_top #(.TAPS(TAPS), .DATA_W(DATA_W), .COEFS(C)) dut (.*);

  tb_fir_checker #(.TAPS(TAPS), .DATA_W(DATA_W), .AW(AW)) chk (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (200000) @(posedge clk);
    chk.failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", chk.checks, chk.failures);
    $finish;
  end

  initial
    for (int k = 0; k < TAPS; k++) chk.h[k] = ((k * 97 + 41) % 256) - 128;
  initial begin
    #1;
    chk.h[3]  = -128;
    chk.h[10] = 127;
  end

  task automatic send(int v);
    x_in = DATA_W'(v);
    x_valid = 1;
    forever begin
      clken = ($urandom_range(0, 99) >= 10);
      #1;
      if (x_ready) break;
      @(negedge clk);
    end
    @(negedge clk);
    x_valid = 0;
  endtask

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1;
    @(negedge clk);
    for (int n = 0; n < 3000; n++) begin
      case ($urandom_range(0, 9))
        0:       send(-128);
        1:       send(127);
        default: send($urandom_range(0, 255) - 128);
      endcase
      if (n == 1500) begin
        // Reset after the last sample has finished: the checker clears its
        // own history at the same time.
        clken = 1;
        repeat (2 * DATA_W) @(negedge clk);
        rst_n = 0;
        @(negedge clk);
        rst_n = 1;
        n_reset++;
      end else if ($urandom_range(0, 7) == 0) begin
        clken = 1;
        repeat ($urandom_range(1, 2 * DATA_W)) @(negedge clk);
      end
    end
    clken = 1;
    repeat (3 * DATA_W) @(negedge clk);
    chk.report_mechanisms();
    chk.checks++;
    if (n_reset != 1) chk.failures++;
    $display("TB_RESULT checks=%0d failures=%0d", chk.checks, chk.failures);
    $finish;
  end
endmodule
