// da_adder_tree: sums N signed IN_W-bit words with a balanced tree of
// ripple carry adders.
//
// The inputs are sign-extended to the full output width OW = IN_W +
// clog2(N), which holds any sum without overflow, and padded with zeros to
// the next power of two. Level l of the tree adds pairs of level l-1 results
// with rca_adder instances; clog2(N) levels give the sum. The tree is
// combinational: sum is valid in the same cycle as the inputs.
// That the outputs of the lookup tables are added by ripple carry adders
// follows the design; the tree shape is this implementation's choice.
module da_adder_tree #(
  parameter int N    = 256,
  parameter int IN_W = 10,
  localparam int LV  = (N > 1) ? $clog2(N) : 1,
  localparam int OW  = IN_W + $clog2(N)
) (
  input  logic signed [IN_W-1:0] in_words [N],
  output logic signed [OW-1:0]   sum
);
  localparam int NP = 2**LV;

  // g_level[l].node[i]: node i of level l; level 0 holds the extended
  // inputs, level LV the total. Each level is an array of its own.
  for (genvar l = 0; l <= LV; l++) begin : g_level
    logic [OW-1:0] node [NP >> l];
    if (l == 0) begin : g_leaves
      for (genvar i = 0; i < NP; i++) begin : g_leaf
        if (i < N) begin : g_in
          assign node[i] = OW'(in_words[i]);
        end else begin : g_pad
          assign node[i] = '0;
        end
      end
    end else begin : g_adders
      for (genvar i = 0; i < (NP >> l); i++) begin : g_node
        rca_adder #(.W(OW)) u_add (
          .a   (g_level[l-1].node[2*i]),
          .b   (g_level[l-1].node[2*i+1]),
          .cin (1'b0),
          .sum (node[i]),
          .cout()
        );
      end
    end
  end

  assign sum = g_level[LV].node[0];
endmodule
