// da_tap_line: the filter's delay line, TAPS samples held in piso registers.
//
// Register k holds the sample x(n-k). On load a new sample enters register
// 0 and every register k takes the sample of register k-1, so the line moves
// by one tap per input sample; on shift every register rotates by one bit.
// bits[k] is the current serial bit of register k: the bits of all TAPS
// samples come out in parallel, most significant bit first, one bit
// position per clock. These TAPS bits are the lookup-table addresses.
//
// Timing: a sample is loaded, then shifted W-1 times, presenting bits W-1
// down to 0 on the W clocks that start with the one after the load. The
// next load comes at or after the clock that presents bit 0, without a
// further shift, so the words are one rotation short of their original
// form when they move on; the load path therefore rotates register k-1's
// word by one bit as it copies it into register k. The caller must keep
// that order (load, then exactly W-1 shifts before the next load), which
// da_control does.
// Samples kept in PISO registers follow the design; the rotating chain and
// its load-path rotation are this implementation's choices.
module da_tap_line #(
  parameter int TAPS = 1024,
  parameter int W    = 8
) (
  input  logic            clk,
  input  logic            rst_n,
  input  logic            load,
  input  logic            shift,
  input  logic [W-1:0]    x_in,
  output logic [TAPS-1:0] bits
);
  logic [W-1:0] word [TAPS];
  logic [W-1:0] d    [TAPS];

  assign d[0] = x_in;
  for (genvar k = 1; k < TAPS; k++) begin : g_link
    assign d[k] = {word[k-1][W-2:0], word[k-1][W-1]};
  end

  for (genvar k = 0; k < TAPS; k++) begin : g_tap
    piso #(.W(W)) u_piso (
      .clk  (clk),
      .rst_n(rst_n),
      .load (load),
      .shift(shift),
      .d    (d[k]),
      .q    (word[k]),
      .sout (bits[k])
    );
  end
endmodule
