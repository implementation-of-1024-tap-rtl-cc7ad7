// full_adder: one-bit full adder, the cell the ripple carry adder is built
// from. Adds the bits a, b and the carry in ci; s is the sum bit and co the
// carry out. Purely combinational.
module full_adder (
  input  logic a,
  input  logic b,
  input  logic ci,
  output logic s,
  output logic co
);
  always_comb begin
    s  = a ^ b ^ ci;
    co = (a & b) | (ci & (a ^ b));
  end
endmodule
