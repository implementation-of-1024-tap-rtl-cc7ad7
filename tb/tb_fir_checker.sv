// tb_fir_checker: reference model and scoreboard shared by the filter
// testbenches.
//
// It watches the filter's handshake: on every rising clock edge with clken,
// x_valid and x_ready high it shifts x_in into its own sample history,
// computes y = sum_k h(k) x(n-k) directly from the coefficients H (integer
// arithmetic, no distributed arithmetic), and queues the result with the
// clock count. On every clock with y_valid it pops the oldest result and
// checks y, q (y saturated to 16 bits), q_sat, and that the result came
// exactly DATA_W enabled clocks after its sample was taken. Signals are sampled on
// the rising edge, before that edge's register updates. It also counts the
// mechanisms the test must reach: back-to-back samples, samples taken from
// idle, clock-enable stalls during a computation, and positive and negative
// output saturation.
module tb_fir_checker #(
  parameter int TAPS   = 16,
  parameter int DATA_W = 8,
  parameter int AW     = 24
) (
  input logic                     clk,
  input logic                     rst_n,
  input logic                     clken,
  input logic signed [DATA_W-1:0] x_in,
  input logic                     x_valid,
  input logic                     x_ready,
  input logic signed [AW-1:0]     y,
  input logic                     y_valid,
  input logic signed [15:0]       q,
  input logic                     q_sat
);
  // Coefficients of the filter under test, written by the testbench.
  int h [TAPS];

  int checks = 0, failures = 0;
  int n_results = 0, n_stream = 0, n_from_idle = 0, n_stall = 0;
  int n_sat_pos = 0, n_sat_neg = 0, n_negative = 0;

  longint hist [TAPS];
  longint exp_q [$];
  longint time_q [$];
  longint cycle = 0;
  longint en_cycle = 0;    // rising edges with clken high
  bit     busy_prev = 0;   // a computation was in progress in the last clock
  longint last_take = -1000;

  initial foreach (hist[k]) hist[k] = 0;

  task automatic fail(string msg);
    failures++;
    if (failures < 20) $display("FAIL %s (clock %0d)", msg, cycle);
  endtask

  always @(posedge clk) begin
    cycle++;
    if (!rst_n) begin
      foreach (hist[k]) hist[k] = 0;
      exp_q.delete();
      time_q.delete();
    end else begin
      if (y_valid) begin
        longint e, es;
        checks++;
        if (exp_q.size() == 0) begin
          fail("result without a sample");
        end else begin
          e = exp_q.pop_front();
          es = (e > 32767) ? 32767 : (e < -32768) ? -32768 : e;
          n_results++;
          if (e > 32767) n_sat_pos++;
          if (e < -32768) n_sat_neg++;
          if (e < 0) n_negative++;
          if (longint'(y) != e) fail($sformatf("y = %0d, expected %0d", y, e));
          checks++;
          if (longint'(q) != es || q_sat != (es != e))
            fail($sformatf("q = %0d sat %0b, expected %0d", q, q_sat, es));
          // The result register is written DATA_W enabled edges after the
          // edge that took the sample and is seen here one edge later;
          // edges with clken low do not count.
          checks++;
          if (en_cycle - time_q.pop_front() != longint'(DATA_W + 1))
            fail("latency is not DATA_W clocks");
        end
      end
      if (clken && x_valid && x_ready) begin
        automatic longint s = 0;
        for (int k = TAPS - 1; k > 0; k--) hist[k] = hist[k-1];
        hist[0] = longint'(x_in);
        for (int k = 0; k < TAPS; k++) s += longint'(h[k]) * hist[k];
        exp_q.push_back(s);
        time_q.push_back(en_cycle);
        if (cycle - last_take == longint'(DATA_W)) n_stream++;
        else n_from_idle++;
        last_take = cycle;
      end
      if (!clken && exp_q.size() > 0) n_stall++;
    end
    if (clken) en_cycle++;
  end

  // Final verdict on the mechanisms; called by the testbench.
  function automatic void report_mechanisms();
    $display("results %0d: streamed %0d, from idle %0d, stall clocks %0d, sat+ %0d, sat- %0d, negative %0d",
             n_results, n_stream, n_from_idle, n_stall, n_sat_pos, n_sat_neg, n_negative);
    checks++;
    if (n_results == 0 || n_stream == 0 || n_from_idle == 0 || n_stall == 0 ||
        n_sat_pos == 0 || n_sat_neg == 0 || n_negative == 0) begin
      failures++;
      $display("FAIL a mechanism was never exercised");
    end
    checks++;
    if (exp_q.size() != 0) begin
      failures++;
      $display("FAIL %0d results missing", exp_q.size());
    end
  endfunction
endmodule
