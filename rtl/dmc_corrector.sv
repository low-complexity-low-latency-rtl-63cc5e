// dmc_corrector: error detection and correction of a retrieved decimal
// matrix code (DMC) codeword {V, H, data} (see dmc_encoder for the layout).
//
// The check bits are recomputed from the retrieved data and XORed with the
// retrieved ones, giving a row syndrome sh (ROWS bits) and a column syndrome
// sv (COLS bits). A single upset of information bit (r, c) sets exactly sh[r]
// and sv[c]: that bit is located and inverted. A single upset of a check bit
// sets exactly one syndrome bit and leaves the data intact. Any other
// non-zero syndrome is an error that cannot be located and is flagged as
// uncorrectable; the data is then passed on unchanged. The code has minimum
// distance 3, so some double upsets (an information bit together with a check
// bit of its row or column) look like a single check-bit upset and are not
// seen.
//
// Interface: codeword_i in; data_o (corrected data), corrected_o (an
// information bit was inverted), parity_err_o (a single check bit was wrong),
// uncorrectable_o out. Purely combinational.
// Locating and correcting the erroneous bit follows the design; the decimal
// (arithmetic) variant of the detection and the multiple-upset patterns it
// lists are not part of this block, which implements XOR syndromes only.
module dmc_corrector #(
  parameter int unsigned ROWS = 2,
  parameter int unsigned COLS = 2,
  localparam int unsigned K   = ROWS * COLS,
  localparam int unsigned P   = ROWS + COLS
) (
  input  logic [K+P-1:0] codeword_i,
  output logic [K-1:0]   data_o,
  output logic           corrected_o,
  output logic           parity_err_o,
  output logic           uncorrectable_o
);

  logic [K-1:0]    data;
  logic [P-1:0]    parity_calc;
  logic [ROWS-1:0] sh;
  logic [COLS-1:0] sv;
  logic            sh_one, sv_one, sh_zero, sv_zero;

  assign data = codeword_i[K-1:0];

  dmc_encoder #(.ROWS(ROWS), .COLS(COLS)) u_enc (
    .data_i     (data),
    .parity_o   (parity_calc),
    .codeword_o ()
  );

  assign sh = parity_calc[ROWS-1:0]    ^ codeword_i[K +: ROWS];
  assign sv = parity_calc[P-1:ROWS]    ^ codeword_i[K+ROWS +: COLS];

  assign sh_zero = (sh == '0);
  assign sv_zero = (sv == '0);
  assign sh_one  = !sh_zero && ((sh & (sh - 1'b1)) == '0);
  assign sv_one  = !sv_zero && ((sv & (sv - 1'b1)) == '0);

  always_comb begin
    data_o = data;
    for (int unsigned r = 0; r < ROWS; r++)
      for (int unsigned c = 0; c < COLS; c++)
        if (sh_one && sv_one && sh[r] && sv[c]) data_o[r*COLS + c] = !data[r*COLS + c];
  end

  assign corrected_o     = sh_one && sv_one;
  assign parity_err_o    = (sh_one && sv_zero) || (sh_zero && sv_one);
  assign uncorrectable_o = !(sh_zero && sv_zero) && !corrected_o && !parity_err_o;

endmodule
