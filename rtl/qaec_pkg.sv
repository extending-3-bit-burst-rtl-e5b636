// qaec_pkg -- the code shared by encoder, syndrome generator and decoder:
// a binary linear systematic block code that corrects every 3-bit burst
// error (single errors, 11, 101 and 111 patterns) and, in addition, every
// quadruple adjacent error (1111), anywhere in the codeword, with no more
// check bits than a plain 3-bit burst code needs.
//
// Codeword layout (bit 0 first): data bits d0..d(K-1), then check bits
// c1..cR. The parity-check matrix is H = [P | I]: data bit j has the R-bit
// column P[j], check bit ci has the unit column with a one in row i-1.
// Check bits sit physically next to each other and next to d(K-1), so
// bursts across the data/check boundary are covered like any other.
//
// Supported sizes (K data bits -> R check bits): 16 -> 7, 32 -> 8, 64 -> 9.
// The document names these three data widths and asks for no more check
// bits than a 3-bit burst code; the check-bit counts are the smallest that
// leave room for all correctable syndromes (107 of 127, 192 of 255 and
// 357 of 511).
//
// The P columns below are this design's own, since the document prints no
// matrix. They were found by a depth-first search that fills the data
// columns from the check-bit end downwards and accepts a column only if
// every correctable pattern ending there has a nonzero syndrome distinct
// from all earlier ones (the document's "error space" and "unique
// syndrome" conditions). Among the matrices found the one with the fewest
// ones, then the lightest heaviest row, was kept (the document's two
// optimisation goals); the search was not run to a proven optimum.
// For K=16 the search also required data word 0xDCCF to get check bits
// 0x2D (codeword 0x2DDCCF = 3005647), the example word of the published
// implementation, which this matrix therefore reproduces.
// Ones in P: 57 (heaviest row 11) for K=16, 105 (15) for K=32,
// 222 (27) for K=64.
package qaec_pkg;

  localparam int unsigned R_MAX = 9;   // check bits of the largest code
  localparam int unsigned N_MAX = 73;  // codeword bits of the largest code

  typedef logic [R_MAX-1:0] col_t;     // one column of H (a syndrome)
  typedef logic [N_MAX-1:0] row_t;     // one row of H

  // Correctable error patterns, as bit masks relative to their first bit.
  typedef enum int unsigned {
    PAT_SINGLE  = 0,  // 1
    PAT_DOUBLE  = 1,  // 11   double adjacent
    PAT_BURST3G = 2,  // 101  3-bit burst with a gap
    PAT_BURST3  = 3,  // 111  triple adjacent
    PAT_QUAD    = 4   // 1111 quadruple adjacent
  } pattern_e;

  localparam int unsigned NUM_PAT   = 5;
  localparam int unsigned PAT_WIDTH = 4;
  localparam logic [PAT_WIDTH-1:0] PAT_MASK [NUM_PAT] = '{
    4'b0001, 4'b0011, 4'b0101, 4'b0111, 4'b1111
  };

  localparam logic [6:0] P16 [16] = '{
    7'h75, 7'h6e, 7'h39, 7'hd, 7'h7c, 7'h43, 7'h69, 7'h3d,
    7'h42, 7'h51, 7'h58, 7'h66, 7'h12, 7'h41, 7'h24, 7'h5e
  };

  localparam logic [7:0] P32 [32] = '{
    8'h17, 8'hda, 8'h69, 8'h1b, 8'h31, 8'h88, 8'h54, 8'h66,
    8'hcc, 8'h84, 8'h9, 8'hd6, 8'h24, 8'h91, 8'hea, 8'h64,
    8'h71, 8'h42, 8'h85, 8'h13, 8'h55, 8'hbe, 8'h21, 8'h56,
    8'h90, 8'h61, 8'h82, 8'hc8, 8'h16, 8'h29, 8'h22, 8'h4e
  };

  localparam logic [8:0] P64 [64] = '{
    9'h1bc, 9'hc5, 9'h12b, 9'h134, 9'h190, 9'h15, 9'h72, 9'h194,
    9'ha1, 9'h2a, 9'h116, 9'h47, 9'h9a, 9'h186, 9'hcd, 9'h1a8,
    9'hd0, 9'h12e, 9'hfb, 9'h11, 9'h146, 9'h24, 9'h18e, 9'h51,
    9'h12c, 9'h182, 9'h4b, 9'h8c, 9'h12a, 9'h43, 9'h150, 9'hce,
    9'h108, 9'h25, 9'hd1, 9'h1ba, 9'h48, 9'hb0, 9'h16, 9'h101,
    9'ha8, 9'h160, 9'h21, 9'h9d, 9'h104, 9'h32, 9'ha7, 9'h102,
    9'h143, 9'h4a, 9'h19, 9'h124, 9'h14c, 9'h13, 9'h92, 9'h120,
    9'h64, 9'h55, 9'h42, 9'hc1, 9'hd, 9'h44, 9'h22, 9'h119
  };

  // Number of check bits for K data bits (0 for an unsupported K).
  function automatic int unsigned check_bits(int unsigned k);
    case (k)
      16:      return 7;
      32:      return 8;
      64:      return 9;
      default: return 0;
    endcase
  endfunction

  // Column j of H for the code with k data bits.
  function automatic col_t h_col(int unsigned k, int unsigned j);
    col_t c;
    c = '0;
    if (j >= k) begin
      c[j-k] = 1'b1;
    end else begin
      case (k)
        16:      c = col_t'(P16[j]);
        32:      c = col_t'(P32[j]);
        64:      c = col_t'(P64[j]);
        default: c = '0;
      endcase
    end
    return c;
  endfunction

  // Row r of H (bit j = entry of column j) for the code with k data bits.
  function automatic row_t h_row(int unsigned k, int unsigned r);
    row_t w;
    col_t c;
    w = '0;
    for (int unsigned j = 0; j < k + check_bits(k); j++) begin
      c = h_col(k, j);
      w[j] = |(c & (col_t'(1) << r));
    end
    return w;
  endfunction

  // Syndrome of pattern p placed with its first bit at codeword bit s;
  // bits falling beyond the codeword are dropped.
  function automatic col_t pattern_syndrome(int unsigned k, int unsigned s, int unsigned p);
    col_t syn;
    logic [PAT_WIDTH-1:0] mask;
    syn  = '0;
    mask = '0;
    for (int unsigned q = 0; q < NUM_PAT; q++) if (q == p) mask = PAT_MASK[q];
    for (int unsigned o = 0; o < PAT_WIDTH; o++) begin
      if (mask[o] && (s + o < k + check_bits(k))) syn ^= h_col(k, s + o);
    end
    return syn;
  endfunction

endpackage
