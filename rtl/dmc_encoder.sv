// dmc_encoder: decimal matrix code (DMC) encoder producing the check bits of
// a ROWS*COLS-bit word.
//
// The word is arranged, logically only, as a matrix of ROWS symbols of COLS
// bits: information bit i(r*COLS + c) sits in row r, column c. For the
// default 2x2 matrix this is
//
//     i1  i0 | H0
//     i3  i2 | H1
//     -------
//     V1  V0
//
// Horizontal check bit H(r) is the XOR of the bits of row r, vertical check
// bit V(c) the XOR of the bits of column c, so that H0 = i0^i1, H1 = i2^i3,
// V0 = i0^i2 and V1 = i1^i3. The systematic codeword is
// {V, H, data}: the data in the low K bits, then the ROWS H bits, then the
// COLS V bits, n = K + ROWS + COLS (8 for the default, an (8,4) code with
// minimum distance 3).
//
// Interface: data_i (K bits) in, parity_o = {V, H} (ROWS+COLS bits) out,
// codeword_o = {parity_o, data_i} out. Purely combinational.
// The matrix, the equations and the 2x2 default follow the design; the bit
// order of the codeword and the generalisation to other matrix shapes are
// this design's choices.
module dmc_encoder #(
  parameter int unsigned ROWS = 2,
  parameter int unsigned COLS = 2,
  localparam int unsigned K   = ROWS * COLS,
  localparam int unsigned P   = ROWS + COLS
) (
  input  logic [K-1:0]   data_i,
  output logic [P-1:0]   parity_o,
  output logic [K+P-1:0] codeword_o
);

  logic [ROWS-1:0] h;
  logic [COLS-1:0] v;

  always_comb begin
    h = '0;
    v = '0;
    for (int unsigned r = 0; r < ROWS; r++) begin
      for (int unsigned c = 0; c < COLS; c++) begin
        h[r] = h[r] ^ data_i[r*COLS + c];
        v[c] = v[c] ^ data_i[r*COLS + c];
      end
    end
  end

  assign parity_o   = {v, h};
  assign codeword_o = {v, h, data_i};

endmodule
