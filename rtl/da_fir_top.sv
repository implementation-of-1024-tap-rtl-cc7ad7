// da_fir_top: TAPS-tap FIR filter, y(n) = sum_{k=0}^{TAPS-1} h(k) x(n-k),
// computed by distributed arithmetic (DA) without multipliers.
//
// Structure:
//   da_tap_line    TAPS piso registers hold x(n) .. x(n-TAPS+1) and present
//                  one bit of every sample per clock, MSB first.
//   rom_rtl        TAPS/4 lookup tables; table p holds the 16 sums of the
//                  coefficients h(4p) .. h(4p+3) and is addressed by the
//                  current bits of x(n-4p) .. x(n-4p-3).
//   da_adder_tree  adds the TAPS/4 table outputs with ripple carry adders.
//   pipo_acc       shift-accumulates the DATA_W per-bit sums (the sign bit
//                  with negative weight) into the exact result y and
//                  delivers it, with the saturated 16-bit word q.
//   da_control     sequences load, shift and accumulate under clken.
// The coefficients are the COEFS parameter (a constant ROM); entries from
// TAPS upwards are ignored. The default set is a triangular low-pass window.
//
// Interface: a sample x_in is taken on a rising clock edge with x_valid,
// x_ready and clken high. y, q and q_sat are updated, and y_valid pulses,
// DATA_W clocks after the sample is taken (one clock per bit plus one for
// the output register, less the overlap of the load with the previous
// sample's last bit). Samples can be given every DATA_W clocks; x_ready is
// low while the filter is busy with the upper bits of a sample or clken is
// low. clken low freezes the whole filter. Active-low asynchronous reset
// clears the delay line (all stored samples become zero) and the outputs.
//
// From the design: 1024 taps, 4-input lookup tables with the address-bit
// order of its table, ripple carry adders, PISO sample registers, a PIPO
// accumulator/output register, a clock enable, 8-bit two's complement input
// and a 16-bit output. This implementation's own choices: 8-bit
// coefficients, MSB-first bit order, the valid/ready handshake, full
// precision inside with saturation to 16 bits at the output, and the extra
// full-precision output y.
module da_fir_top #(
  parameter int                      TAPS   = 1024,
  parameter int                      DATA_W = da_fir_pkg::DATA_W,
  parameter da_fir_pkg::coef_array_t COEFS  = da_fir_pkg::bartlett_coefs(TAPS),
  localparam int LUT_K = da_fir_pkg::LUT_K,
  localparam int OUT_W = da_fir_pkg::OUT_W,
  localparam int NLUT  = TAPS / LUT_K,
  localparam int LW    = da_fir_pkg::lut_w(),
  localparam int SW    = da_fir_pkg::sum_w(TAPS),
  localparam int AW    = da_fir_pkg::acc_w(TAPS, DATA_W)
) (
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic                    clken,
  input  logic signed [DATA_W-1:0] x_in,
  input  logic                    x_valid,
  output logic                    x_ready,
  output logic signed [AW-1:0]    y,
  output logic                    y_valid,
  output logic signed [OUT_W-1:0] q,
  output logic                    q_sat
);
  // The delay line is split into whole 4-tap lookup groups.
  if (TAPS % LUT_K != 0 || TAPS > da_fir_pkg::MAX_TAPS || DATA_W < 2) begin : g_bad_size
    $error("da_fir_top: TAPS must be a multiple of %0d and at most %0d, DATA_W at least 2",
           LUT_K, da_fir_pkg::MAX_TAPS);
  end

  logic            load, shift, acc_en, first, last, busy;
  logic [TAPS-1:0] bits;
  logic signed [LW-1:0] lut_out [NLUT];
  logic signed [SW-1:0] bit_sum;

  da_control #(.DATA_W(DATA_W)) u_ctrl (
    .clk     (clk),
    .rst_n   (rst_n),
    .clken   (clken),
    .in_valid(x_valid),
    .in_ready(x_ready),
    .load    (load),
    .shift   (shift),
    .acc_en  (acc_en),
    .first   (first),
    .last    (last),
    .busy    (busy)
  );

  da_tap_line #(.TAPS(TAPS), .W(DATA_W)) u_taps (
    .clk  (clk),
    .rst_n(rst_n),
    .load (load),
    .shift(shift),
    .x_in (x_in),
    .bits (bits)
  );

  for (genvar p = 0; p < NLUT; p++) begin : g_lut
    localparam da_fir_pkg::coef_t GC [LUT_K] = '{COEFS[LUT_K*p], COEFS[LUT_K*p+1],
                                     COEFS[LUT_K*p+2], COEFS[LUT_K*p+3]};
    logic [LUT_K-1:0] addr;
    // Address bit LUT_K-1-j carries the bit of x(n - (4p + j)), which
    // multiplies coefficient j of this group.
    for (genvar j = 0; j < LUT_K; j++) begin : g_addr
      assign addr[LUT_K-1-j] = bits[LUT_K*p+j];
    end
    rom_rtl #(.K(LUT_K), .COEF_W(da_fir_pkg::COEF_W), .COEF(GC)) u_rom (
      .addr(addr),
      .data(lut_out[p])
    );
  end

  da_adder_tree #(.N(NLUT), .IN_W(LW)) u_tree (
    .in_words(lut_out),
    .sum     (bit_sum)
  );

  pipo_acc #(.SUM_W(SW), .ACC_W(AW), .OUT_W(OUT_W)) u_acc (
    .clk    (clk),
    .rst_n  (rst_n),
    .en     (acc_en),
    .first  (first),
    .last   (last),
    .s      (bit_sum),
    .y      (y),
    .y_valid(y_valid),
    .q      (q),
    .q_sat  (q_sat)
  );

  // One result per sample: a result can only follow a busy period.
  a_valid_after_busy: assert property (@(posedge clk) disable iff (!rst_n)
                                       y_valid |-> $past(busy));
endmodule
