// qaec_syndrome -- syndrome generator of the code defined in qaec_pkg.
//
// Computes s = H * r over GF(2) for a received N-bit codeword r: syndrome
// bit r is the XOR of the codeword bits selected by row r of the
// parity-check matrix, i.e. the recomputed check bit XOR the stored one.
// A zero syndrome means no detected error; every correctable error pattern
// (single, double adjacent, 3-bit burst, quadruple adjacent) gives its own
// distinct nonzero syndrome.
//
// Timing: combinational. Interface: code_i (N bits, data in the low K bits,
// check bits above), syn_o (R bits). The matrix is this design's own (see
// qaec_pkg); the syndrome computation itself is the standard one for a
// binary linear block code as used by the document.
module qaec_syndrome
  import qaec_pkg::*;
#(
  parameter  int unsigned K = 16,
  localparam int unsigned R = check_bits(K),
  localparam int unsigned N = K + R
) (
  input  logic [N-1:0] code_i,
  output logic [R-1:0] syn_o
);

  for (genvar r = 0; r < R; r++) begin : g_row
    localparam row_t ROW = h_row(K, r);
    assign syn_o[r] = ^(code_i & ROW[N-1:0]);
  end

endmodule
