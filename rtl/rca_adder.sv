// rca_adder: W-bit ripple carry adder.
//
// A chain of W full_adder cells: cell i adds a[i], b[i] and the carry out
// of cell i-1 (cell 0 takes cin), so the carry ripples from bit 0 to bit
// W-1 and cout is the carry out of the last cell. sum = a + b + cin modulo
// 2**W; for two's complement operands the same sum bits are the signed sum.
// Subtraction a - b is done by the caller as a + ~b with cin = 1, which is
// how the filter's accumulator uses the carry input.
// The ripple structure follows the design; the width is a parameter.
// Purely combinational.
module rca_adder #(
  parameter int W = 16
) (
  input  logic [W-1:0] a,
  input  logic [W-1:0] b,
  input  logic         cin,
  output logic [W-1:0] sum,
  output logic         cout
);
  // Each cell's carry is a signal of its own, named g_bit[i].co.
  for (genvar i = 0; i < W; i++) begin : g_bit
    logic ci, co;
    if (i == 0) begin : g_first
      assign ci = cin;
    end else begin : g_next
      assign ci = g_bit[i-1].co;
    end
    full_adder u_fa (
      .a (a[i]),
      .b (b[i]),
      .ci(ci),
      .s (sum[i]),
      .co(co)
    );
  end

  assign cout = g_bit[W-1].co;
endmodule
