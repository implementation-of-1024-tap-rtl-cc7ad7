// piso: parallel-in serial-out register for one input sample.
//
// load writes the W-bit word d. shift rotates the word left by one bit, so
// sout = q[W-1] presents the stored bits most significant first, one per
// shift. Because the word is rotated rather than shifted out, after W
// rotations it is back in its original form and nothing is lost: the
// filter keeps its delayed samples in these registers. load has priority
// over shift. Synchronous, active-low asynchronous reset to zero.
// A PISO register per sample follows the design; rotating instead of
// shifting out, and the MSB-first order, are this implementation's choices.
module piso #(
  parameter int W = 8
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         load,
  input  logic         shift,
  input  logic [W-1:0] d,
  output logic [W-1:0] q,
  output logic         sout
);
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)     q <= '0;
    else if (load)  q <= d;
    else if (shift) q <= {q[W-2:0], q[W-1]};
  end

  assign sout = q[W-1];
endmodule
