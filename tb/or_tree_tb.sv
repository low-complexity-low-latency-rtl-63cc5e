// or_tree_tb: self-checking test of the OR-gate tree for N = 2, 5 and 8,
// over every input pattern (the 8-input one over all 256). The output must be
// 1 exactly when some input is 1. Ends with the TB_RESULT line.
module or_tree_tb;
  logic clk = 1'b0;
  always #5 clk = !clk;

  int checks = 0, failures = 0;

  logic [7:0] x;
  logic y2, y5, y8;

  or_tree #(.N(2)) u2 (.x_i(x[1:0]), .y_o(y2));
  or_tree #(.N(5)) u5 (.x_i(x[4:0]), .y_o(y5));
  or_tree #(.N(8)) u8 (.x_i(x),      .y_o(y8));

  initial begin
    for (int v = 0; v < 256; v++) begin
      x = 8'(v);
      @(posedge clk);
      checks += 3;
      if (y2 != (v % 4 != 0))  begin failures++; $display("FAIL N=2 x=%h", x); end
      if (y5 != (v % 32 != 0)) begin failures++; $display("FAIL N=5 x=%h", x); end
      if (y8 != (v != 0))      begin failures++; $display("FAIL N=8 x=%h", x); end
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
