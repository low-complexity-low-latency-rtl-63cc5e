// bwa_tb: self-checking test of the butterfly-formed weight accumulator.
//
// Applies every input pattern to four instances: the common structure over
// 8 inputs (output weights 8,4,4,2,4,2,2,1 listed here by hand), and revised
// forms with PMAX = 1 and PMAX = 2 over 8 inputs and PMAX = 2 over 5 inputs.
// For each, the weighted sum of the outputs must equal the number of ones
// whenever the overflow flag is clear; the flag may be set only at a count of
// 2*PMAX or more, and with PMAX = 1 it must be set exactly from a count of 2. Ends with the TB_RESULT line.
module bwa_tb;
  import ecc_match_pkg::*;

  logic clk = 1'b0;
  always #5 clk = !clk;

  int checks = 0, failures = 0;

  logic [7:0] x8;
  logic [4:0] x5;
  logic [7:0] w_full, w_p1, w_p2, w5;
  logic       o_full, o_p1, o_p2, o5;

  bwa #(.N(8))            u_full (.x_i(x8), .w_o(w_full), .ovf_o(o_full));
  bwa #(.N(8), .PMAX(1))  u_p1   (.x_i(x8), .w_o(w_p1),   .ovf_o(o_p1));
  bwa #(.N(8), .PMAX(2))  u_p2   (.x_i(x8), .w_o(w_p2),   .ovf_o(o_p2));
  bwa #(.N(5), .PMAX(2))  u_5    (.x_i(x5), .w_o(w5),     .ovf_o(o5));

  // Output weights of an 8-input BWA, index 0 .. 7.
  localparam int W8 [8] = '{8, 4, 4, 2, 4, 2, 2, 1};

  function automatic int wsum(logic [7:0] w);
    int s = 0;
    for (int i = 0; i < 8; i++) if (w[i]) s += W8[i];
    return s;
  endfunction

  function automatic int ones(logic [7:0] v);
    int s = 0;
    for (int i = 0; i < 8; i++) s += int'(v[i]);
    return s;
  endfunction

  task automatic check(string what, int pmax, int cnt, logic [7:0] w, logic ovf);
    checks++;
    // An overflow may only be raised at a count of 2*PMAX or more; at a
    // count up to PMAX it must not be.
    if ((ovf && cnt < 2 * pmax) || (cnt <= pmax && ovf)) begin
      failures++;
      $display("FAIL %s x=%h cnt=%0d ovf=%0b", what, x8, cnt, ovf);
    end
    if (pmax == 1) begin
      // With PMAX = 1 a single weight-1 bit remains: overflow exactly from 2.
      checks++;
      if (ovf != (cnt >= 2)) begin failures++; $display("FAIL %s ovf at cnt=%0d", what, cnt); end
    end
    if (!ovf) begin
      checks++;
      if (wsum(w) != cnt) begin
        failures++;
        $display("FAIL %s x=%h cnt=%0d sum=%0d", what, x8, cnt, wsum(w));
      end
    end
  endtask

  initial begin
    for (int v = 0; v < 256; v++) begin
      x8 = 8'(v);
      x5 = 5'(v);
      @(posedge clk);
      check("full", 8, ones(x8), w_full, o_full);
      check("p1",   1, ones(x8), w_p1,   o_p1);
      check("p2",   2, ones(x8), w_p2,   o_p2);
      check("n5",   2, ones({3'b0, x5}), w5, o5);
    end
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
