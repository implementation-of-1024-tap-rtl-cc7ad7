// tb_da_fir_4tap: the smallest filter, four taps and a single 16-entry
// lookup table, driven with an impulse, a step and random samples.
//
// With coefficients b0..b3 = 37, -100, 127, -128 the impulse x = 1, 0, 0, 0
// must give y = b0, b1, b2, b3, 0 (each output is one table entry times the
// sample); an impulse of -128 must give the same sequence times -128; a step
// of 127 must give 127 * (b0, b0+b1, b0+b1+b2, b0+b1+b2+b3). The expected
// values are written out here, and tb_fir_checker additionally checks every
// output of a random run against the direct convolution.
module tb_da_fir_4tap;
  localparam int TAPS = 4, DATA_W = 8;
  localparam int AW = 8 + $clog2(TAPS) + DATA_W;
  localparam da_fir_pkg::coef_array_t C =
    '{0: 8'sd37, 1: -8'sd100, 2: 8'sd127, 3: -8'sd128, default: 8'sd0};

  logic clk = 0, rst_n = 0, clken = 1, x_valid = 0, x_ready, y_valid, q_sat;
  logic signed [DATA_W-1:0] x_in = '0;
  logic signed [AW-1:0] y;
  logic signed [15:0] q;
  int got [$];
  int checks_local = 0, failures_local = 0;

  da_fir_top #(.TAPS(TAPS), .DATA_W(DATA_W), .COEFS(C)) dut (.*);

  tb_fir_checker #(.TAPS(TAPS), .DATA_W(DATA_W), .AW(AW)) chk (.*);

  always #5 clk = ~clk;

  always @(posedge clk) if (rst_n && y_valid) got.push_back(int'(y));

  initial begin
    repeat (50000) @(posedge clk);
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", chk.checks + checks_local,
             chk.failures + failures_local + 1);
    $finish;
  end

  initial begin
    chk.h[0] = 37; chk.h[1] = -100; chk.h[2] = 127; chk.h[3] = -128;
  end

  task automatic send(int v);
    x_in = DATA_W'(v);
    x_valid = 1;
    #1;
    while (!x_ready) begin
      @(negedge clk);
      #1;
    end
    @(negedge clk);
    x_valid = 0;
  endtask

  task automatic expect_seq(string what, int exp [$]);
    repeat (2 * DATA_W) @(negedge clk);
    checks_local++;
    if (got != exp) begin
      failures_local++;
      $display("FAIL %s: got %p expected %p", what, got, exp);
    end
    got.delete();
  endtask

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1;
    @(negedge clk);
    send(1); send(0); send(0); send(0); send(0);
    expect_seq("impulse", '{37, -100, 127, -128, 0});
    send(-128); send(0); send(0); send(0); send(0);
    expect_seq("negative impulse", '{-128 * 37, -128 * -100, -128 * 127, -128 * -128, 0});
    send(127); send(127); send(127); send(127); send(127);
    expect_seq("step", '{127 * 37, 127 * -63, 127 * 64, 127 * -64, 127 * -64});
    for (int n = 0; n < 500; n++) send($urandom_range(0, 255) - 128);
    repeat (3 * DATA_W) @(negedge clk);
    $display("TB_RESULT checks=%0d failures=%0d", chk.checks + checks_local,
             chk.failures + failures_local);
    $finish;
  end
endmodule
