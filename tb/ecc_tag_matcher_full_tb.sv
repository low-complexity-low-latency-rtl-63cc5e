// ecc_tag_matcher_full_tb: exhaustive test of the matcher at its default
// configuration (2x2 DMC, (8,4) code, T_MAX = R_MAX = 1).
//
// Every incoming tag (16) is compared with every possible stored codeword
// (256), 4096 comparisons in all. The expected result is worked out here:
// the incoming tag is encoded with the hand-written DMC equations, the
// distance d to the stored word is counted, and d = 0 must give an exact
// match, d = 1 a match with soft_err_o, d >= 2 a mismatch. The corrector
// outputs are checked against the nearest codeword found by search. The
// number of exact matches, corrected matches, mismatches, overflows of the
// OR-gate tree and corrector actions are counted, and each must occur.
// Ends with the TB_RESULT line.
module ecc_tag_matcher_full_tb;
  import ecc_match_pkg::*;

  logic clk = 1'b0;
  always #5 clk = !clk;

  int checks = 0, failures = 0;
  int n_exact = 0, n_soft = 0, n_mismatch = 0, n_or = 0, n_corr = 0, n_perr = 0, n_fail = 0;

  logic [3:0] tag;
  logic [7:0] cw;
  match_res_e res;
  logic       soft_e;
  logic [0:0] dist_v;
  logic [3:0] ctag;
  logic       cdone, cpar, cfail;

  ecc_tag_matcher dut (
    .tag_i(tag), .codeword_i(cw), .result_o(res), .soft_err_o(soft_e), .dist_o(dist_v),
    .corr_tag_o(ctag), .corr_done_o(cdone), .corr_parity_o(cpar), .corr_fail_o(cfail));

  function automatic logic [7:0] enc(logic [3:0] d);
    return {d[1] ^ d[3], d[0] ^ d[2], d[2] ^ d[3], d[0] ^ d[1], d};
  endfunction

  initial begin
    for (int t = 0; t < 16; t++) begin
      for (int c = 0; c < 256; c++) begin
        int d, best_d, best_t;
        tag = 4'(t);
        cw  = 8'(c);
        @(posedge clk);
        d = $countones(enc(tag) ^ cw);
        checks++;
        if (d == 0) begin
          n_exact++;
          if (res != RES_MATCH || soft_e) begin failures++; $display("FAIL exact t=%h cw=%h", tag, cw); end
        end else if (d == 1) begin
          n_soft++;
          if (res != RES_MATCH || !soft_e) begin failures++; $display("FAIL soft_e t=%h cw=%h", tag, cw); end
        end else begin
          n_mismatch++;
          if (res != RES_MISMATCH) begin failures++; $display("FAIL mismatch t=%h cw=%h res=%0d", tag, cw, res); end
        end
        if (d <= 1) begin
          checks++;
          if (int'(dist_v) != d) begin failures++; $display("FAIL dist_v t=%h cw=%h", tag, cw); end
        end
        // A first-level BWA (PMAX = 1) feeds the OR-gate tree exactly when
        // its part of the word differs in two or more bits.
        if ($countones(enc(tag)[3:0] ^ cw[3:0]) >= 2 || $countones(enc(tag)[7:4] ^ cw[7:4]) >= 2)
          n_or++;
        // Corrector: only depends on cw; check once per codeword.
        if (t == 0) begin
          best_d = 99; best_t = 0;
          for (int u = 0; u < 16; u++)
            if ($countones(enc(4'(u)) ^ cw) < best_d) begin
              best_d = $countones(enc(4'(u)) ^ cw); best_t = u;
            end
          if (cdone) n_corr++;
          if (cpar) n_perr++;
          if (cfail) n_fail++;
          checks++;
          if (best_d == 0 && (ctag != cw[3:0] || cdone || cpar || cfail)) begin
            failures++; $display("FAIL corrector clean cw=%h", cw);
          end else if (best_d == 1 && (ctag != 4'(best_t) || cfail)) begin
            failures++; $display("FAIL corrector single cw=%h got %h want %h", cw, ctag, best_t);
          end else if (best_d >= 2 && !(cdone || cpar || cfail)) begin
            failures++; $display("FAIL corrector missed cw=%h", cw);
          end
        end
      end
    end
    $display("exact=%0d soft_e=%0d mismatch=%0d or_tree=%0d corrected=%0d parity_err=%0d uncorrectable=%0d",
             n_exact, n_soft, n_mismatch, n_or, n_corr, n_perr, n_fail);
    checks += 6;
    if (n_exact == 0)    begin failures++; $display("FAIL no exact match"); end
    if (n_soft == 0)     begin failures++; $display("FAIL no corrected match"); end
    if (n_mismatch == 0) begin failures++; $display("FAIL no mismatch"); end
    if (n_or == 0)       begin failures++; $display("FAIL OR-gate tree never set"); end
    if (n_corr == 0)     begin failures++; $display("FAIL corrector never corrected"); end
    if (n_fail == 0)     begin failures++; $display("FAIL corrector never flagged"); end
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
