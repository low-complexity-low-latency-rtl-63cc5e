// dmc_encoder_tb: self-checking test of the DMC encoder.
//
// For the default 2x2 matrix all 16 words are encoded and the check bits are
// compared with the equations H0 = i0^i1, H1 = i2^i3, V0 = i0^i2, V1 = i1^i3
// written out by hand. For a 4x4 matrix, 200 random words are checked against
// row and column parities computed here, and the minimum distance of the
// 2x2 code (3) is confirmed over all pairs of codewords. Ends with the
// TB_RESULT line.
module dmc_encoder_tb;
  logic clk = 1'b0;
  always #5 clk = !clk;

  int checks = 0, failures = 0;

  logic [3:0]  d;
  logic [3:0]  p;
  logic [7:0]  cw;
  logic [15:0] d16;
  logic [7:0]  p16;
  logic [23:0] cw16;
  logic [7:0]  cws [16];

  dmc_encoder u22 (.data_i(d), .parity_o(p), .codeword_o(cw));
  dmc_encoder #(.ROWS(4), .COLS(4)) u44 (.data_i(d16), .parity_o(p16), .codeword_o(cw16));

  initial begin
    int mind;
    for (int v = 0; v < 16; v++) begin
      logic h0, h1, v0, v1;
      d = 4'(v);
      d16 = 16'($urandom);
      @(posedge clk);
      h0 = d[0] ^ d[1];
      h1 = d[2] ^ d[3];
      v0 = d[0] ^ d[2];
      v1 = d[1] ^ d[3];
      checks++;
      if (cw != {v1, v0, h1, h0, d}) begin
        failures++;
        $display("FAIL 2x2 d=%h cw=%h", d, cw);
      end
      cws[v] = cw;
    end
    for (int n = 0; n < 200; n++) begin
      logic [7:0] exp;
      d16 = 16'($urandom);
      @(posedge clk);
      exp = '0;
      for (int r = 0; r < 4; r++)
        for (int c = 0; c < 4; c++) begin
          exp[r]     ^= d16[r*4 + c];
          exp[4 + c] ^= d16[r*4 + c];
        end
      checks++;
      if (p16 != exp || cw16 != {exp, d16}) begin
        failures++;
        $display("FAIL 4x4 d=%h p=%h exp=%h", d16, p16, exp);
      end
    end
    mind = 99;
    for (int a = 0; a < 16; a++)
      for (int b = a + 1; b < 16; b++)
        if ($countones(cws[a] ^ cws[b]) < mind) mind = $countones(cws[a] ^ cws[b]);
    checks++;
    if (mind != 3) begin failures++; $display("FAIL minimum distance %0d", mind); end
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
