// rom_rtl: one distributed-arithmetic lookup table.
//
// Holds the 2**K sums of every subset of K filter coefficients b0..b(K-1)
// and returns the entry picked by addr. Address bit K-1 (the MSB) selects
// b0 and bit 0 (the LSB) selects b(K-1): for K = 4, address 1000 gives b0,
// 0001 gives b3, 1100 gives b0+b1 and 1111 gives b0+b1+b2+b3. In the filter,
// address bit K-1-j is the current bit of the sample that multiplies b(j).
// The table is computed from the COEF parameter at elaboration, so it is a
// constant ROM; the read is combinational (the entry is valid in the same
// cycle as the address). The entry is a signed sum, COEF_W + clog2(K) bits
// wide, so it never overflows.
// The 16-entry table and its address-bit order follow the design; computing
// the entries at elaboration from a parameter is this implementation's
// choice.
module rom_rtl #(
  parameter int K      = 4,
  parameter int COEF_W = 8,
  parameter logic signed [COEF_W-1:0] COEF [K] = '{default: '0},
  localparam int DW    = COEF_W + $clog2(K)
) (
  input  logic [K-1:0]         addr,
  output logic signed [DW-1:0] data
);
  typedef logic signed [DW-1:0] lut_t [2**K];

  function automatic lut_t build_lut();
    lut_t t;
    for (int a = 0; a < 2**K; a++) begin
      t[a] = '0;
      for (int j = 0; j < K; j++)
        if (a[K-1-j]) t[a] = t[a] + DW'(COEF[j]);
    end
    return t;
  endfunction

  localparam lut_t LUT = build_lut();

  assign data = LUT[addr];
endmodule
