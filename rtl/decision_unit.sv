// decision_unit: turns the outputs of the Hamming-distance counter into the
// match / mismatch / fault result.
//
// The distance d between the encoded incoming tag and the retrieved
// codeword falls in one of four ranges:
//   d = 0               exact match                 -> RES_MATCH
//   1 <= d <= T_MAX     match, stored word has a
//                       correctable error           -> RES_MATCH, soft_err_o = 1
//   T_MAX < d <= R_MAX  stored word corrupted beyond
//                       correction (detected)       -> RES_FAULT
//   d > R_MAX           different tag               -> RES_MISMATCH
// Any overflow flag (the OR-gate tree of the second level, or a carry that
// left a second-level BWA) means d >= 2*PMAX > R_MAX, the fourth range. Without
// an overflow every remaining weight bit is exact, and d is the sum of the
// weights of the set bits (at most a few bits of weights up to PMAX, added
// here by a small adder).
//
// Interface: or_i, ovf_i, bits_i from bwa_second_level (same KT, KP, PMAX);
// result_o, soft_err_o and dist_o (d, valid when no overflow; its width
// DW is just enough for the largest sum the second level can report) out. Purely
// combinational.
// The unit and its three outcomes are named in the design; the range
// boundaries follow the direct-compare scheme the design builds on, and the
// adder and the separate soft_err_o flag are this design's choices.
module decision_unit
  import ecc_match_pkg::*;
#(
  parameter int unsigned KT    = 4,
  parameter int unsigned KP    = 4,
  parameter int unsigned T_MAX = T_MAX_DEF,
  parameter int unsigned R_MAX = R_MAX_DEF,
  localparam int unsigned PMAX = pmax_of(R_MAX),
  localparam int unsigned LP   = clog2(PMAX),
  localparam int unsigned NJ   = LP + 1,
  localparam int unsigned NO   = l2_out_width(KT, KP, LP),
  localparam int unsigned DW   = dist_width(KT, KP, R_MAX)
) (
  input  logic                  or_i,
  input  logic [NJ-1:0]         ovf_i,
  input  logic [NJ-1:0][NO-1:0] bits_i,
  output match_res_e            result_o,
  output logic                  soft_err_o,
  output logic [DW-1:0]         dist_o
);

  logic over;
  logic [NJ-1:0][NO-1:0][DW-1:0] term;

  // Each set bit contributes its weight, a constant of the structure.
  for (genvar j = 0; j < NJ; j++) begin : g_j
    for (genvar i = 0; i < NO; i++) begin : g_i
      localparam int unsigned WEIGHT = l2_bit_weight(KT, KP, PMAX, j, i);
      assign term[j][i] = bits_i[j][i] ? DW'(WEIGHT) : '0;
    end
  end

  always_comb begin
    dist_o = '0;
    for (int unsigned j = 0; j < NJ; j++)
      for (int unsigned i = 0; i < NO; i++)
        dist_o = dist_o + term[j][i];
  end

  assign over = or_i || (|ovf_i);

  always_comb begin
    soft_err_o = 1'b0;
    if (over || int'(dist_o) > R_MAX) begin
      result_o = RES_MISMATCH;
    end else if (int'(dist_o) > T_MAX) begin
      result_o = RES_FAULT;
    end else begin
      result_o   = RES_MATCH;
      soft_err_o = (dist_o != '0);
    end
  end

endmodule
