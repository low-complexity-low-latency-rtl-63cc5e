// dmc_corrector_tb: self-checking test of the DMC error corrector.
//
// 2x2 matrix: every word is encoded (check bits from the hand-written
// equations), then presented unchanged, with every single upset (8 each) and
// with every double upset (28 each). A clean word must pass with no flag; a
// single upset of an information bit must be corrected and flagged; a single
// upset of a check bit must leave the data intact and be flagged as such; a
// double upset must raise at least one flag. 4x4 matrix: 300 random words,
// each with one random upset, must come out corrected. Ends with the
// TB_RESULT line.
module dmc_corrector_tb;
  logic clk = 1'b0;
  always #5 clk = !clk;

  int checks = 0, failures = 0;

  logic [7:0]  cw;
  logic [3:0]  dout;
  logic        corr, perr, fail;
  logic [23:0] cw16;
  logic [15:0] dout16;
  logic        corr16, perr16, fail16;

  dmc_corrector u22 (.codeword_i(cw), .data_o(dout), .corrected_o(corr),
                     .parity_err_o(perr), .uncorrectable_o(fail));
  dmc_corrector #(.ROWS(4), .COLS(4)) u44 (.codeword_i(cw16), .data_o(dout16),
                     .corrected_o(corr16), .parity_err_o(perr16), .uncorrectable_o(fail16));

  function automatic logic [7:0] enc22(logic [3:0] d);
    return {d[1] ^ d[3], d[0] ^ d[2], d[2] ^ d[3], d[0] ^ d[1], d};
  endfunction

  function automatic logic [23:0] enc44(logic [15:0] d);
    logic [7:0] p = '0;
    for (int r = 0; r < 4; r++)
      for (int c = 0; c < 4; c++) begin
        p[r]     ^= d[r*4 + c];
        p[4 + c] ^= d[r*4 + c];
      end
    return {p, d};
  endfunction

  initial begin
    for (int v = 0; v < 16; v++) begin
      logic [7:0] good;
      good = enc22(4'(v));
      cw = good;
      @(posedge clk);
      checks++;
      if (dout != 4'(v) || corr || perr || fail) begin
        failures++; $display("FAIL clean cw=%h", cw);
      end
      for (int b = 0; b < 8; b++) begin
        cw = good ^ (8'd1 << b);
        @(posedge clk);
        checks++;
        if (dout != 4'(v) || fail || (b < 4 ? !corr || perr : corr || !perr)) begin
          failures++; $display("FAIL single b=%0d cw=%h dout=%h %b%b%b", b, cw, dout, corr, perr, fail);
        end
        for (int b2 = b + 1; b2 < 8; b2++) begin
          cw = good ^ (8'd1 << b) ^ (8'd1 << b2);
          @(posedge clk);
          checks++;
          if (!(corr || perr || fail)) begin
            failures++; $display("FAIL double undetected cw=%h", cw);
          end
        end
      end
    end
    for (int n = 0; n < 300; n++) begin
      logic [15:0] d;
      d = 16'($urandom);
      cw16 = enc44(d) ^ (24'd1 << ($urandom % 24));
      @(posedge clk);
      checks++;
      if (dout16 != d || fail16 || !(corr16 || perr16)) begin
        failures++; $display("FAIL 4x4 cw=%h dout=%h", cw16, dout16);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
