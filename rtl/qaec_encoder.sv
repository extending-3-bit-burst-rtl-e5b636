// qaec_encoder -- systematic encoder of the burst/quadruple-adjacent
// error-correcting code defined in qaec_pkg.
//
// The codeword keeps the K data bits unchanged in code_o[K-1:0] and appends
// R check bits in code_o[K+R-1:K] (c1 in bit K). Check bit c(r+1) is the XOR
// of the data bits whose parity-check-matrix column has a one in row r, so
// each check bit is one XOR tree; the row masks are elaboration-time
// constants taken from qaec_pkg::h_row.
//
// Timing: purely combinational, no clock and no reset, as in the published
// implementation (a single LUT-level XOR path from input to output).
// Follows the document: the code, the 16/32/64-bit data widths, the
// systematic data-first bit layout. This design's own: the particular
// parity-check matrix (see qaec_pkg) and the port names.
module qaec_encoder
  import qaec_pkg::*;
#(
  parameter  int unsigned K = 16,
  localparam int unsigned R = check_bits(K),
  localparam int unsigned N = K + R
) (
  input  logic [K-1:0] data_i,
  output logic [N-1:0] code_o
);

  assign code_o[K-1:0] = data_i;

  for (genvar r = 0; r < R; r++) begin : g_check
    localparam row_t ROW = h_row(K, r);
    assign code_o[K+r] = ^(data_i & ROW[K-1:0]);
  end

endmodule
