// xor_bank: array of W bitwise comparators (exclusive-OR gates).
//
// Bit i of diff_o is 1 exactly when bit i of a_i and bit i of b_i differ, so
// the number of ones in diff_o is the Hamming distance between the two
// inputs. The matcher uses one bank for the k tag bits (stored tag against
// incoming tag) and one for the n-k parity bits (stored parity against the
// parity of the freshly encoded incoming tag), which work in parallel.
//
// Interface: a_i, b_i in, diff_o out. Purely combinational, one gate level.
module xor_bank #(
  parameter int unsigned W = 4
) (
  input  logic [W-1:0] a_i,
  input  logic [W-1:0] b_i,
  output logic [W-1:0] diff_o
);

  always_comb begin
    for (int unsigned i = 0; i < W; i++) diff_o[i] = a_i[i] ^ b_i[i];
  end

endmodule
