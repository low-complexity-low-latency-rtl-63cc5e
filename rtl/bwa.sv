// bwa: butterfly-formed weight accumulator (BWA), counting the ones among N
// input bits with half adders only.
//
// The inputs are padded with zeros to NP = 2**L bits. Each of the L stages
// holds NP/2 half adders. At stage s the vector consists of 2**s groups of
// G = NP >> s bits that all carry the same weight w; the half adder on the
// pair (2i, 2i+1) of a group puts its carry (weight 2w) into the first half
// of the group and its sum (weight w) into the second half. The next stage
// treats each half as a group of its own, so a half adder always adds either
// two carries or two sums of the stage above: the butterfly connection. After
// the last stage, output bit idx has weight 2**(L - popcount(idx)) (see
// ecc_match_pkg::bwa_w); for N = 8 the weights are 8,4,4,2,4,2,2,1, and the
// sum of the weights of the set outputs is the number of ones at the input.
//
// Revised form: only whether the count exceeds a limit matters to the
// matcher, so every carry whose weight is above PMAX leaves the half-adder
// tree and is ORed into ovf_o instead (the OR-gate tree of the revised BWA);
// the half adders that would have added such carries are not built, and the
// outputs of weight above PMAX are constant 0. With PMAX >= NP (the default)
// no carry leaves and the BWA is the plain common structure, with ovf_o = 0.
// PMAX should be a power of two.
//
// Since a set carry of weight 2*PMAX means at least 2*PMAX ones, ovf_o set
// implies a count of at least 2*PMAX. The converse need not hold: several
// output bits of weight PMAX may be set together, and combining them is left
// to the second level. With ovf_o clear, the weighted sum of w_o is exact.
// For PMAX = 1 a single weight-1 output remains and ovf_o is set exactly
// when the count is 2 or more.
//
// Interface: x_i in, w_o out (weights as above), ovf_o out. Purely
// combinational.
// The stage structure and the OR-tree revision follow the design; the
// zero padding of a width that is not a power of two is this design's choice.
module bwa
  import ecc_match_pkg::*;
#(
  parameter int unsigned N    = 8,
  parameter int unsigned PMAX = 1 << bwa_levels(N)
) (
  input  logic [N-1:0]                  x_i,
  output logic [(1<<bwa_levels(N))-1:0] w_o,
  output logic                          ovf_o
);

  localparam int unsigned L  = bwa_levels(N);
  localparam int unsigned NP = 1 << L;

  // v[s] is the bit vector entering stage s; v[L] is the result.
  logic [NP-1:0] v [L+1];
  logic [L:0]    ovf_stage;

  always_comb begin
    v[0] = '0;
    v[0][N-1:0] = x_i;
    ovf_stage = '0;
    for (int unsigned s = 0; s < L; s++) begin
      v[s+1] = '0;
      for (int unsigned g = 0; g < (1 << s); g++) begin
        for (int unsigned i = 0; i < ((NP >> s) / 2); i++) begin
          logic a, b;
          a = v[s][g * (NP >> s) + 2 * i];
          b = v[s][g * (NP >> s) + 2 * i + 1];
          if ((1 << (s - popcnt(g))) <= PMAX) begin
            // Half adder on a live pair.
            if (2 * (1 << (s - popcnt(g))) <= PMAX)
              v[s+1][g * (NP >> s) + i] = a & b;
            else
              ovf_stage[s] = ovf_stage[s] | (a & b);
            v[s+1][g * (NP >> s) + (NP >> s) / 2 + i] = a ^ b;
          end
        end
      end
    end
  end

  assign w_o   = v[L];
  assign ovf_o = |ovf_stage;

endmodule
