// ecc_tag_matcher: direct comparison of an incoming tag with a stored
// ECC-protected tag, without decoding the stored codeword first.
//
// A cache tag (or TLB entry) of K bits is kept as a systematic decimal matrix
// code (DMC) codeword {parity, tag}. To check a lookup, the incoming tag is
// encoded, and the stored codeword is accepted when it lies within the
// correctable distance of that encoding. Because the code is systematic,
// the tag part needs no encoder: the tag XOR bank and its BWA start at once,
// while the parity XOR bank waits only for the encoder. The datapath is
//
//   tag_i ---------------------> XOR bank (K) ----> BWA for tags    --+
//   tag_i --> DMC encoder -----> XOR bank (P) ----> BWA for parities --+
//   codeword_i (tag / parity) -----^                                   |
//              interconnection: OR-gate tree + BWAs for 2**j's  <------+
//                                  |
//                            decision unit --> match / mismatch / fault
//
// Both first-level BWAs are in revised form: every carry above PMAX (the
// largest power of two not above R_MAX) is ORed instead of added.
// Next to the compare path, a DMC corrector locates and inverts a single
// upset bit of the stored tag (corr_tag_o), so that a corrupted entry can be
// repaired; it is not on the path of the result.
//
// Interface: tag_i (K = ROWS*COLS bits) and codeword_i (K + ROWS + COLS bits,
// {V, H, tag}) in; result_o (RES_MATCH / RES_FAULT / RES_MISMATCH), soft_err_o
// (match with a correctable error), dist_o (Hamming distance, exact when the
// result is not RES_MISMATCH), corr_tag_o, corr_done_o, corr_parity_o, corr_fail_o out.
// Purely combinational: the result is valid one propagation delay after the
// inputs.
// The structure follows the design. The defaults T_MAX = R_MAX = 1 are this
// design's reading of the 2x2 DMC (minimum distance 3: one error corrected,
// any larger distance a different tag).
module ecc_tag_matcher
  import ecc_match_pkg::*;
#(
  parameter int unsigned ROWS  = DMC_ROWS,
  parameter int unsigned COLS  = DMC_COLS,
  parameter int unsigned T_MAX = T_MAX_DEF,
  parameter int unsigned R_MAX = R_MAX_DEF,
  localparam int unsigned K    = ROWS * COLS,
  localparam int unsigned P    = ROWS + COLS,
  localparam int unsigned N    = K + P,
  localparam int unsigned PMAX = pmax_of(R_MAX),
  localparam int unsigned DW   = dist_width(K, P, R_MAX)
) (
  input  logic [K-1:0]  tag_i,
  input  logic [N-1:0]  codeword_i,
  output match_res_e    result_o,
  output logic          soft_err_o,
  output logic [DW-1:0] dist_o,
  output logic [K-1:0]  corr_tag_o,
  output logic          corr_done_o,
  output logic          corr_parity_o,
  output logic          corr_fail_o
);

  if (T_MAX > R_MAX) begin : g_bad_range
    $error("ecc_tag_matcher: T_MAX must not exceed R_MAX");
  end

  localparam int unsigned LT  = bwa_levels(K);
  localparam int unsigned LPT = bwa_levels(P);
  localparam int unsigned NJ  = clog2(PMAX) + 1;
  localparam int unsigned NO  = l2_out_width(K, P, clog2(PMAX));

  logic [P-1:0]          parity_in;
  logic [K-1:0]          diff_tag;
  logic [P-1:0]          diff_par;
  logic [(1<<LT)-1:0]    wt;
  logic [(1<<LPT)-1:0]   wp;
  logic                  ovf_t, ovf_p, or2;
  logic [NJ-1:0]         ovf2;
  logic [NJ-1:0][NO-1:0] bits2;

  dmc_encoder #(.ROWS(ROWS), .COLS(COLS)) u_enc (
    .data_i     (tag_i),
    .parity_o   (parity_in),
    .codeword_o ()
  );

  xor_bank #(.W(K)) u_xor_tag (
    .a_i    (codeword_i[K-1:0]),
    .b_i    (tag_i),
    .diff_o (diff_tag)
  );

  xor_bank #(.W(P)) u_xor_par (
    .a_i    (codeword_i[N-1:K]),
    .b_i    (parity_in),
    .diff_o (diff_par)
  );

  bwa #(.N(K), .PMAX(PMAX)) u_bwa_tag (
    .x_i   (diff_tag),
    .w_o   (wt),
    .ovf_o (ovf_t)
  );

  bwa #(.N(P), .PMAX(PMAX)) u_bwa_par (
    .x_i   (diff_par),
    .w_o   (wp),
    .ovf_o (ovf_p)
  );

  bwa_second_level #(.KT(K), .KP(P), .PMAX(PMAX)) u_l2 (
    .wt_i    (wt),
    .ovf_t_i (ovf_t),
    .wp_i    (wp),
    .ovf_p_i (ovf_p),
    .or_o    (or2),
    .ovf_o   (ovf2),
    .bits_o  (bits2)
  );

  decision_unit #(.KT(K), .KP(P), .T_MAX(T_MAX), .R_MAX(R_MAX)) u_dec (
    .or_i       (or2),
    .ovf_i      (ovf2),
    .bits_i     (bits2),
    .result_o   (result_o),
    .soft_err_o (soft_err_o),
    .dist_o     (dist_o)
  );

  dmc_corrector #(.ROWS(ROWS), .COLS(COLS)) u_corr (
    .codeword_i      (codeword_i),
    .data_o          (corr_tag_o),
    .corrected_o     (corr_done_o),
    .parity_err_o    (corr_parity_o),
    .uncorrectable_o (corr_fail_o)
  );

endmodule
