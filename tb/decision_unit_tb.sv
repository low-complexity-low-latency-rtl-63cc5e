// decision_unit_tb: self-checking test of the decision unit, driven directly.
//
// Default configuration (4 + 4 bits, T_MAX = R_MAX = 1): the only live weight
// bit is bits[0][1] (weight 1). Configuration 16 + 8 bits with T_MAX = 1,
// R_MAX = 3 (PMAX = 2): live bits bits[0][0] (2), bits[0][1] (1) and
// bits[1][7] (2). Every combination of the live bits and the overflow inputs
// is applied; the expected distance and range are worked out here from those
// hand-derived weights. Ends with the TB_RESULT line.
module decision_unit_tb;
  import ecc_match_pkg::*;

  logic clk = 1'b0;
  always #5 clk = !clk;

  int checks = 0, failures = 0;

  logic            or_a;
  logic [0:0]      ovf_a;
  logic [0:0][1:0] bits_a;
  match_res_e      res_a;
  logic            se_a;
  logic [0:0]      d_a;

  logic            or_b;
  logic [1:0]      ovf_b;
  logic [1:0][7:0] bits_b;
  match_res_e      res_b;
  logic            se_b;
  logic [2:0]      d_b;

  decision_unit u_a (.or_i(or_a), .ovf_i(ovf_a), .bits_i(bits_a),
                     .result_o(res_a), .soft_err_o(se_a), .dist_o(d_a));
  decision_unit #(.KT(16), .KP(8), .T_MAX(1), .R_MAX(3)) u_b (
                     .or_i(or_b), .ovf_i(ovf_b), .bits_i(bits_b),
                     .result_o(res_b), .soft_err_o(se_b), .dist_o(d_b));

  function automatic match_res_e classify(int d, logic over, int t, int r);
    if (over || d > r) return RES_MISMATCH;
    if (d > t) return RES_FAULT;
    return RES_MATCH;
  endfunction

  initial begin
    int seen_fault;
    seen_fault = 0;
    for (int v = 0; v < 64; v++) begin
      int d;
      logic over;
      or_a = v[0]; ovf_a = v[1]; bits_a = '0; bits_a[0][1] = v[2];
      or_b = v[0]; ovf_b = v[2:1]; bits_b = '0;
      bits_b[0][0] = v[3]; bits_b[0][1] = v[4]; bits_b[1][7] = v[5];
      @(posedge clk);
      // A
      over = v[0] | v[1];
      d = int'(v[2]);
      checks++;
      if (res_a != classify(d, over, 1, 1) || se_a != (!over && d == 1)) begin
        failures++; $display("FAIL A v=%0d res=%0d", v, res_a);
      end
      // B
      over = v[0] | v[1] | v[2];
      d = 2 * v[3] + v[4] + 2 * v[5];
      checks++;
      if (res_b != classify(d, over, 1, 3) || se_b != (!over && d == 1)) begin
        failures++; $display("FAIL B v=%0d res=%0d d=%0d", v, res_b, d_b);
      end
      if (!over) begin
        checks++;
        if (int'(d_b) != d) begin failures++; $display("FAIL B dist %0d != %0d", d_b, d); end
      end
      if (res_b == RES_FAULT) seen_fault++;
    end
    checks++;
    if (seen_fault == 0) begin failures++; $display("FAIL fault range never reached"); end
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
