// xor_bank_tb: self-checking test of the XOR bank. For a 4-bit bank every
// pair of inputs is applied; for a 12-bit bank 500 random pairs. Each output
// bit must be 1 exactly where the inputs differ. Ends with the TB_RESULT line.
module xor_bank_tb;
  logic clk = 1'b0;
  always #5 clk = !clk;

  int checks = 0, failures = 0;

  logic [3:0]  a4, b4, d4;
  logic [11:0] a12, b12, d12;

  xor_bank #(.W(4))  u4  (.a_i(a4),  .b_i(b4),  .diff_o(d4));
  xor_bank #(.W(12)) u12 (.a_i(a12), .b_i(b12), .diff_o(d12));

  initial begin
    for (int v = 0; v < 256; v++) begin
      a4 = 4'(v);
      b4 = 4'(v >> 4);
      a12 = 12'($urandom);
      b12 = 12'($urandom);
      @(posedge clk);
      for (int i = 0; i < 4; i++) begin
        checks++;
        if (d4[i] != (a4[i] != b4[i])) begin failures++; $display("FAIL W=4 a=%h b=%h", a4, b4); end
      end
      for (int i = 0; i < 12; i++) begin
        checks++;
        if (d12[i] != (a12[i] != b12[i])) begin failures++; $display("FAIL W=12 bit %0d", i); end
      end
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
