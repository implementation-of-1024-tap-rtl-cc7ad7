// pipo_acc: bit-serial shift-accumulator and parallel output register of the
// DA filter.
//
// Each clock with en high it takes the sum s of all lookup-table outputs for
// one bit position of the input samples, most significant bit first, and
// updates acc with a ripple carry adder:
//   first bit (first = 1):  acc = -s            (0 + ~s + carry in 1)
//   later bits:             acc = 2*acc + s
// The first bit is the two's complement sign bit, whose weight is negative,
// so after DATA_W bits acc = sum_k h(k) * x(n-k) exactly. On the clock with
// last high the result is also copied into the parallel output register y
// and y_valid pulses for one clock. q is y saturated to OUT_W bits (the
// filter's 16-bit output word); q_sat flags a clipped q.
// ACC_W must be at least SUM_W + DATA_W for the result to be exact. The
// accumulator's top bit is never shifted into the next value: every partial
// result fits in ACC_W-1 bits, so it only carries the sign.
// An accumulator register built around the ripple carry adder and the
// parallel output register follow the design; the MSB-first order,
// full-precision width and output saturation are this implementation's.
// Timing: y and q appear the clock after the one that carries last.
// Active-low asynchronous reset clears every register.
module pipo_acc #(
  parameter int SUM_W = 18,
  parameter int ACC_W = 26,
  parameter int OUT_W = 16
) (
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic                    en,
  input  logic                    first,
  input  logic                    last,
  input  logic signed [SUM_W-1:0] s,
  output logic signed [ACC_W-1:0] y,
  output logic                    y_valid,
  output logic signed [OUT_W-1:0] q,
  output logic                    q_sat
);
  logic [ACC_W-1:0] acc, op_a, op_b, nxt;
  logic [ACC_W-1:0] s_ext;

  assign s_ext = ACC_W'(s);

  always_comb begin
    if (first) begin
      op_a = '0;
      op_b = ~s_ext;
    end else begin
      op_a = {acc[ACC_W-2:0], 1'b0};
      op_b = s_ext;
    end
  end

  rca_adder #(.W(ACC_W)) u_add (
    .a   (op_a),
    .b   (op_b),
    .cin (first),
    .sum (nxt),
    .cout()
  );

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      acc     <= '0;
      y       <= '0;
      y_valid <= 1'b0;
    end else begin
      y_valid <= en && last;
      if (en) begin
        acc <= nxt;
        if (last) y <= nxt;
      end
    end
  end

  // Saturate the full-precision result to the OUT_W-bit output word.
  localparam logic signed [ACC_W-1:0] QMAX = ACC_W'((64'sd1 <<< (OUT_W - 1)) - 1);
  localparam logic signed [ACC_W-1:0] QMIN = -QMAX - 1;

  always_comb begin
    if (y > QMAX) begin
      q     = OUT_W'(QMAX);
      q_sat = 1'b1;
    end else if (y < QMIN) begin
      q     = OUT_W'(QMIN);
      q_sat = 1'b1;
    end else begin
      q     = OUT_W'(y);
      q_sat = 1'b0;
    end
  end
endmodule
