// or_tree: balanced tree of two-input OR gates over N inputs.
//
// Used at the second level of the matcher to merge the "count above the
// limit" flags produced by the OR-gate trees of the first-level BWAs. The
// tree is built level by level: level l holds ceil(N / 2**l) nodes, node i
// being the OR of nodes 2i and 2i+1 of the level above (a missing partner
// counts as 0), so the depth is ceil(log2 N) gates.
//
// Interface: x_i in, y_o = OR of all inputs. Purely combinational.
// The function (an OR-gate tree) follows the design; the balanced two-input
// shape is this design's choice.
module or_tree
  import ecc_match_pkg::*;
#(
  parameter int unsigned N = 2
) (
  input  logic [N-1:0] x_i,
  output logic         y_o
);

  localparam int unsigned L  = clog2(N);
  localparam int unsigned NP = 1 << L;

  logic [NP-1:0] lvl [L+1];

  always_comb begin
    lvl[0] = '0;
    lvl[0][N-1:0] = x_i;
    for (int unsigned l = 1; l <= L; l++) begin
      lvl[l] = '0;
      for (int unsigned i = 0; i < (NP >> l); i++)
        lvl[l][i] = lvl[l-1][2*i] | lvl[l-1][2*i+1];
    end
  end

  assign y_o = lvl[L][0];

endmodule
