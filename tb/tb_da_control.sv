// tb_da_control: self-checking test of the filter sequencer.
// A cycle-level reference model of the intended sequence (idle, load, D bit
// clocks with first on the first and last on the last, shift on all but the
// last, back-to-back loads on the last bit clock) runs beside the controller
// under random in_valid and clken; every output is compared on every clock.
// The test also measures that a continuously fed controller takes one sample
// every D clocks.
module tb_da_control;
  localparam int D = 8;
  logic clk = 0, rst_n = 0, clken = 0, in_valid = 0;
  logic in_ready, load, shift, acc_en, first, last, busy;
  int checks = 0, failures = 0;
  int m_busy = 0, m_cnt = 0;
  int n_stall = 0, n_stream = 0, n_idle_load = 0;

  da_control #(.DATA_W(D)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic expect_eq(string what, int got, int exp);
    checks++;
    if (got != exp) begin
      failures++;
      $display("FAIL %s at %0t: got %0d exp %0d", what, $time, got, exp);
    end
  endtask

  // Compare outputs with the model just before each rising edge, then
  // advance the model.
  always @(negedge clk) if (rst_n) begin
    int e_last, e_ready, e_load;
    #2;
    e_last  = m_busy && (m_cnt == D - 1);
    e_ready = clken && (!m_busy || e_last);
    e_load  = in_valid && e_ready;
    expect_eq("busy",     busy,     m_busy);
    expect_eq("first",    first,    m_busy && m_cnt == 0);
    expect_eq("last",     last,     e_last);
    expect_eq("in_ready", in_ready, e_ready);
    expect_eq("load",     load,     e_load);
    expect_eq("acc_en",   acc_en,   clken && m_busy);
    expect_eq("shift",    shift,    clken && m_busy && !e_last);
    if (!clken && m_busy) n_stall++;
    if (e_load && m_busy) n_stream++;
    if (e_load && !m_busy) n_idle_load++;
    if (clken) begin
      if (e_load) begin
        m_busy = 1; m_cnt = 0;
      end else if (m_busy) begin
        if (e_last) m_busy = 0;
        else m_cnt++;
      end
    end
  end

  initial begin
    int loads, t0;
    @(negedge clk);
    rst_n = 1;
    // Random phase.
    repeat (3000) begin
      clken    = ($urandom_range(0, 5) != 0);
      in_valid = ($urandom_range(0, 2) != 0);
      @(negedge clk);
    end
    // Throughput: continuous input, clock enabled.
    clken = 1; in_valid = 1;
    loads = 0;
    t0 = 0;
    for (int c = 0; c < 10 * D; c++) begin
      @(posedge clk);
      if (load) loads++;
      t0++;
    end
    @(negedge clk);
    expect_eq("samples per 10*D clocks", loads, 10);
    in_valid = 0;
    repeat (2 * D) @(negedge clk);
    expect_eq("idle after last sample", busy, 0);
    checks++;
    if (n_stall == 0 || n_stream == 0 || n_idle_load == 0) begin
      failures++;
      $display("FAIL stall %0d stream %0d idle-load %0d", n_stall, n_stream, n_idle_load);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
