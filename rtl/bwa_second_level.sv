// bwa_second_level: interconnection and second level of the Hamming-distance
// counter.
//
// The first level has two BWAs in revised form, one over the KT tag
// difference bits and one over the KP parity difference bits. Each delivers
// an OR-gate-tree output (count above PMAX) and weight bits of weights up to
// PMAX. This block routes them by weight:
//   * the two OR-tree outputs go into a second-level OR-gate tree (or_o);
//   * every weight bit of weight 2**j, from either BWA, goes into the
//     second-level BWA for 2**j's, j = 0 .. log2(PMAX). That BWA counts in
//     units of 2**j, so it is a revised BWA with limit PMAX >> j: its carries
//     that would exceed PMAX in absolute weight leave through its own
//     ovf_o[j], and its remaining output bits (bits_o[j]) have absolute
//     weights 2**j * bwa_w(levels, idx), never above PMAX.
// Weights above PMAX never reach this level, because they were already
// ORed in the first-level BWAs.
//
// Interface: wt_i/ovf_t_i from the tag BWA, wp_i/ovf_p_i from the parity
// BWA; or_o, ovf_o (one per second-level BWA) and bits_o (row j = outputs of
// the BWA for 2**j's, zero padded) to the decision unit. Purely
// combinational.
// The routing by weight and the set of second-level blocks follow the
// design; the order in which bits of equal weight enter a BWA (tag bits
// first) and the per-BWA overflow outputs are this design's choices.
module bwa_second_level
  import ecc_match_pkg::*;
#(
  parameter int unsigned KT   = 4,
  parameter int unsigned KP   = 4,
  parameter int unsigned PMAX = 1,
  localparam int unsigned LT  = bwa_levels(KT),
  localparam int unsigned LPT = bwa_levels(KP),
  localparam int unsigned LP  = clog2(PMAX),
  localparam int unsigned NJ  = LP + 1,
  localparam int unsigned NO  = l2_out_width(KT, KP, LP)
) (
  input  logic [(1<<LT)-1:0]      wt_i,
  input  logic                    ovf_t_i,
  input  logic [(1<<LPT)-1:0]     wp_i,
  input  logic                    ovf_p_i,
  output logic                    or_o,
  output logic [NJ-1:0]           ovf_o,
  output logic [NJ-1:0][NO-1:0]   bits_o
);

  or_tree #(.N(2)) u_or (
    .x_i ({ovf_p_i, ovf_t_i}),
    .y_o (or_o)
  );

  for (genvar j = 0; j < NJ; j++) begin : g_w
    localparam int unsigned CT = bwa_cnt(LT, 1 << j);
    localparam int unsigned CP = bwa_cnt(LPT, 1 << j);
    localparam int unsigned M  = CT + CP;
    if (M == 0) begin : g_none
      assign bits_o[j] = '0;
      assign ovf_o[j]  = 1'b0;
    end else begin : g_bwa
      localparam int unsigned LM = bwa_levels(M);
      logic [M-1:0]        in;
      logic [(1<<LM)-1:0]  out;
      for (genvar m = 0; m < M; m++) begin : g_in
        if (m < CT) begin : g_t
          assign in[m] = wt_i[bwa_sel(LT, 1 << j, m)];
        end else begin : g_p
          assign in[m] = wp_i[bwa_sel(LPT, 1 << j, m - CT)];
        end
      end
      bwa #(.N(M), .PMAX(PMAX >> j)) u_bwa (
        .x_i   (in),
        .w_o   (out),
        .ovf_o (ovf_o[j])
      );
      always_comb begin
        bits_o[j] = '0;
        bits_o[j][(1<<LM)-1:0] = out;
      end
    end
  end

endmodule
