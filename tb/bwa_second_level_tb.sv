// bwa_second_level_tb: self-checking test of the interconnection and second
// level, fed by two revised first-level BWAs as in the matcher.
//
// Configurations: 4 tag + 4 parity bits with PMAX = 1 (every pattern of the 8
// difference bits), 16 + 8 bits with PMAX = 2 and 16 + 8 bits with PMAX = 4
// (random patterns, biased toward few ones). Without an overflow the weights
// of the set output bits, taken from a table written here by hand for each
// configuration, must add up to the number of ones; with an overflow the
// number of ones must be at least 2*PMAX. Ends with the TB_RESULT line.
module bwa_second_level_tb;
  import ecc_match_pkg::*;

  logic clk = 1'b0;
  always #5 clk = !clk;

  int checks = 0, failures = 0;
  int n_over = 0;

  // Configuration A: 4 + 4, PMAX 1.
  logic [3:0] ta, pa;
  logic [3:0] wta, wpa;
  logic ota, opa, ora;
  logic [0:0] ovfa;
  logic [0:0][1:0] bitsa;
  bwa #(.N(4), .PMAX(1)) ua_t (.x_i(ta), .w_o(wta), .ovf_o(ota));
  bwa #(.N(4), .PMAX(1)) ua_p (.x_i(pa), .w_o(wpa), .ovf_o(opa));
  bwa_second_level #(.KT(4), .KP(4), .PMAX(1)) ua (
    .wt_i(wta), .ovf_t_i(ota), .wp_i(wpa), .ovf_p_i(opa),
    .or_o(ora), .ovf_o(ovfa), .bits_o(bitsa));

  // Configuration B: 16 + 8, PMAX 2.
  logic [15:0] tb_, tc;
  logic [7:0]  pb, pc;
  logic [15:0] wtb, wtc;
  logic [7:0]  wpb, wpc;
  logic otb, opb, orb, otc, opc, orc;
  logic [1:0] ovfb;
  logic [1:0][7:0] bitsb;
  bwa #(.N(16), .PMAX(2)) ub_t (.x_i(tb_), .w_o(wtb), .ovf_o(otb));
  bwa #(.N(8),  .PMAX(2)) ub_p (.x_i(pb),  .w_o(wpb), .ovf_o(opb));
  bwa_second_level #(.KT(16), .KP(8), .PMAX(2)) ub (
    .wt_i(wtb), .ovf_t_i(otb), .wp_i(wpb), .ovf_p_i(opb),
    .or_o(orb), .ovf_o(ovfb), .bits_o(bitsb));

  // Configuration C: 16 + 8, PMAX 4.
  localparam int NOC = l2_out_width(16, 8, 2);
  logic [2:0] ovfc;
  logic [2:0][NOC-1:0] bitsc;
  bwa #(.N(16), .PMAX(4)) uc_t (.x_i(tc), .w_o(wtc), .ovf_o(otc));
  bwa #(.N(8),  .PMAX(4)) uc_p (.x_i(pc), .w_o(wpc), .ovf_o(opc));
  bwa_second_level #(.KT(16), .KP(8), .PMAX(4)) uc (
    .wt_i(wtc), .ovf_t_i(otc), .wp_i(wpc), .ovf_p_i(opc),
    .or_o(orc), .ovf_o(ovfc), .bits_o(bitsc));

  // Hand-derived weights. A: the BWA for 1's has 2 inputs (one weight-1 bit
  // from each first-level BWA), outputs idx0 (weight 2, pruned), idx1 (1).
  // B: BWA for 1's, 2 inputs: idx0 -> 2, idx1 -> 1. BWA for 2's, 7 inputs
  // (4 from the 16-bit BWA, 3 from the 8-bit one), 3 stages, only its
  // weight-1 output idx7 survives -> absolute 2.
  function automatic int sum_a();
    return int'(bitsa[0][1]);
  endfunction
  function automatic int sum_b();
    return 2 * int'(bitsb[0][0]) + int'(bitsb[0][1]) + 2 * int'(bitsb[1][7]);
  endfunction
  // C: weights from the package formula 2**j * 2**(L - popcount(idx)),
  // applied only where that weight is within PMAX.
  function automatic int sum_c();
    int s = 0;
    for (int j = 0; j < 3; j++)
      for (int i = 0; i < NOC; i++)
        if (bitsc[j][i]) s += int'(l2_bit_weight(16, 8, 4, j, i));
    return s;
  endfunction

  function automatic logic [31:0] sparse(int width);
    logic [31:0] v = '0;
    int k = $urandom % 7;
    for (int i = 0; i < k; i++) v[$urandom % width] = 1'b1;
    return v;
  endfunction

  task automatic check(string what, int cnt, logic over, int s, int pmax);
    checks++;
    if (over) begin
      n_over++;
      if (cnt < 2 * pmax) begin failures++; $display("FAIL %s overflow at cnt=%0d", what, cnt); end
    end else if (s != cnt) begin
      failures++; $display("FAIL %s cnt=%0d sum=%0d", what, cnt, s);
    end
  endtask

  initial begin
    for (int v = 0; v < 256; v++) begin
      ta = 4'(v); pa = 4'(v >> 4);
      tb_ = 16'(sparse(16)); pb = 8'(sparse(8));
      tc  = 16'(sparse(16)); pc = 8'(sparse(8));
      @(posedge clk);
      check("A", $countones({ta, pa}), ora | ovfa[0], sum_a(), 1);
      check("B", $countones({tb_, pb}), orb | (|ovfb), sum_b(), 2);
      check("C", $countones({tc, pc}), orc | (|ovfc), sum_c(), 4);
    end
    checks++;
    if (n_over == 0) begin failures++; $display("FAIL no overflow seen"); end
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
