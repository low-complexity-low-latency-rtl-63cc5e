// ecc_tag_matcher_tb: end-to-end test of the matcher in two configurations.
//
//  A: the default 2x2 DMC, T_MAX = R_MAX = 1 (one error corrected).
//  B: a 4x4 DMC ((24,16) code) used for detection only, T_MAX = 0,
//     R_MAX = 2, so that distances 1 and 2 fall in the fault range and the
//     second level has BWAs for 1's and 2's.
// Stimulus: random tags, stored words made from an encoded tag (the same one
// or another) with 0 to 4 random upsets. The expected range comes from an
// encoder written here and a popcount of the difference. The tb counts how
// often each mechanism happens: exact match, corrected match, fault,
// mismatch, OR-gate tree overflow, overflow of a second-level BWA, and the
// corrector's correction and error flag; each must happen at least once.
// Ends with the TB_RESULT line.
module ecc_tag_matcher_tb;
  import ecc_match_pkg::*;

  logic clk = 1'b0;
  always #5 clk = !clk;

  int checks = 0, failures = 0;
  int n_exact = 0, n_soft = 0, n_fault = 0, n_mismatch = 0, n_or = 0, n_l2ovf = 0;
  int n_corr = 0, n_flag = 0;

  // Configuration A.
  logic [3:0]  tag_a, ctag_a;
  logic [7:0]  cw_a;
  match_res_e  res_a;
  logic        soft_a, cd_a, cp_a, cf_a;
  logic [0:0]  dist_a;
  ecc_tag_matcher ua (
    .tag_i(tag_a), .codeword_i(cw_a), .result_o(res_a), .soft_err_o(soft_a), .dist_o(dist_a),
    .corr_tag_o(ctag_a), .corr_done_o(cd_a), .corr_parity_o(cp_a), .corr_fail_o(cf_a));

  // Configuration B.
  logic [15:0] tag_b, ctag_b;
  logic [23:0] cw_b;
  match_res_e  res_b;
  logic        soft_b, cd_b, cp_b, cf_b;
  logic [2:0]  dist_b;
  ecc_tag_matcher #(.ROWS(4), .COLS(4), .T_MAX(0), .R_MAX(2)) ub (
    .tag_i(tag_b), .codeword_i(cw_b), .result_o(res_b), .soft_err_o(soft_b), .dist_o(dist_b),
    .corr_tag_o(ctag_b), .corr_done_o(cd_b), .corr_parity_o(cp_b), .corr_fail_o(cf_b));

  function automatic logic [7:0] enc_a(logic [3:0] d);
    return {d[1] ^ d[3], d[0] ^ d[2], d[2] ^ d[3], d[0] ^ d[1], d};
  endfunction

  function automatic logic [23:0] enc_b(logic [15:0] d);
    logic [7:0] p = '0;
    for (int r = 0; r < 4; r++)
      for (int c = 0; c < 4; c++) begin
        p[r]     ^= d[r*4 + c];
        p[4 + c] ^= d[r*4 + c];
      end
    return {p, d};
  endfunction

  function automatic match_res_e expect_res(int d, int t, int r);
    if (d > r) return RES_MISMATCH;
    if (d > t) return RES_FAULT;
    return RES_MATCH;
  endfunction

  task automatic count(match_res_e r, logic soft_e);
    if (r == RES_MATCH && !soft_e) n_exact++;
    if (r == RES_MATCH && soft_e)  n_soft++;
    if (r == RES_FAULT)          n_fault++;
    if (r == RES_MISMATCH)       n_mismatch++;
  endtask

  initial begin
    for (int n = 0; n < 3000; n++) begin
      int da, db, ka, kb;
      logic [3:0]  sa;
      logic [15:0] sb;
      tag_a = 4'($urandom);
      tag_b = 16'($urandom);
      // Stored tag: the same as the incoming one half of the time.
      sa = (($urandom % 2) != 0) ? tag_a : 4'($urandom);
      sb = (($urandom % 2) != 0) ? tag_b : tag_b ^ (16'd1 << ($urandom % 16));
      cw_a = enc_a(sa);
      cw_b = enc_b(sb);
      ka = $urandom % 4;
      kb = $urandom % 5;
      for (int i = 0; i < ka; i++) cw_a[$urandom % 8]  ^= 1'b1;
      for (int i = 0; i < kb; i++) cw_b[$urandom % 24] ^= 1'b1;
      @(posedge clk);
      da = $countones(enc_a(tag_a) ^ cw_a);
      db = $countones(enc_b(tag_b) ^ cw_b);
      checks += 2;
      if (res_a != expect_res(da, 1, 1) || soft_a != (da == 1)) begin
        failures++; $display("FAIL A tag=%h cw=%h d=%0d res=%0d", tag_a, cw_a, da, res_a);
      end
      if (res_b != expect_res(db, 0, 2) || soft_b) begin
        failures++; $display("FAIL B tag=%h cw=%h d=%0d res=%0d", tag_b, cw_b, db, res_b);
      end
      if (db <= 2) begin
        checks++;
        if (int'(dist_b) != db) begin failures++; $display("FAIL B dist %0d != %0d", dist_b, db); end
      end
      // Corrector of B: with exactly one upset on a valid word, the stored tag comes back.
      if (kb == 1) begin
        logic [23:0] clean;
        clean = enc_b(sb);
        checks++;
        if ($countones(clean ^ cw_b) == 1 && ctag_b != sb) begin
          failures++; $display("FAIL B corrector cw=%h", cw_b);
        end
      end
      count(res_a, soft_a);
      count(res_b, soft_b);
      // In configuration A (PMAX = 1) a first-level BWA sends its count to
      // the OR-gate tree exactly when it sees two or more differences, and
      // the second-level BWA for 1's overflows exactly when the tag part and
      // the parity part differ in one bit each.
      if ($countones(enc_a(tag_a)[3:0] ^ cw_a[3:0]) >= 2 ||
          $countones(enc_a(tag_a)[7:4] ^ cw_a[7:4]) >= 2) n_or++;
      if ($countones(enc_a(tag_a)[3:0] ^ cw_a[3:0]) == 1 &&
          $countones(enc_a(tag_a)[7:4] ^ cw_a[7:4]) == 1) begin
        n_l2ovf++;
        checks++;
        if (res_a != RES_MISMATCH) begin failures++; $display("FAIL A second-level carry"); end
      end
      if (cd_a || cd_b) n_corr++;
      if (cf_a || cf_b) n_flag++;
    end
    $display("exact=%0d soft_e=%0d fault=%0d mismatch=%0d or_tree=%0d l2_ovf=%0d corrected=%0d flagged=%0d",
             n_exact, n_soft, n_fault, n_mismatch, n_or, n_l2ovf, n_corr, n_flag);
    checks += 8;
    if (n_exact == 0)    begin failures++; $display("FAIL no exact match"); end
    if (n_soft == 0)     begin failures++; $display("FAIL no corrected match"); end
    if (n_fault == 0)    begin failures++; $display("FAIL no fault"); end
    if (n_mismatch == 0) begin failures++; $display("FAIL no mismatch"); end
    if (n_or == 0)       begin failures++; $display("FAIL OR-gate tree never set"); end
    if (n_l2ovf == 0)    begin failures++; $display("FAIL second-level overflow never set"); end
    if (n_corr == 0)     begin failures++; $display("FAIL corrector never corrected"); end
    if (n_flag == 0)     begin failures++; $display("FAIL corrector never flagged"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
