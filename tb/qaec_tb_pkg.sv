// qaec_tb_pkg -- reference model shared by the testbenches of the
// burst/quadruple-adjacent error-correcting code.
//
// ref_encode builds a codeword column by column (XOR of the H columns of
// the set data bits), a different route from the row-wise XOR trees of the
// RTL. pattern_vec places a correctable error pattern in a codeword, and
// ref_syndrome recomputes a syndrome bit by bit from the H columns.
package qaec_tb_pkg;
  import qaec_pkg::*;

  typedef logic [N_MAX-1:0] word_t;

  function automatic word_t ref_encode(int unsigned k, logic [63:0] d);
    col_t  c;
    word_t w;
    c = '0;
    w = '0;
    for (int unsigned j = 0; j < k; j++) begin
      w[j] = d[j];
      if (d[j]) c ^= h_col(k, j);
    end
    for (int unsigned i = 0; i < check_bits(k); i++) w[k+i] = c[i];
    return w;
  endfunction

  function automatic col_t ref_syndrome(int unsigned k, word_t w);
    col_t c;
    c = '0;
    for (int unsigned j = 0; j < k + check_bits(k); j++) if (w[j]) c ^= h_col(k, j);
    return c;
  endfunction

  // Number of bits from the first to the last one of pattern p.
  function automatic int unsigned pattern_span(int unsigned p);
    int unsigned sp;
    sp = 0;
    for (int unsigned o = 0; o < PAT_WIDTH; o++) if (PAT_MASK[p][o]) sp = o + 1;
    return sp;
  endfunction

  // Pattern p starting at bit s; the caller keeps s + span <= n.
  function automatic word_t pattern_vec(int unsigned s, int unsigned p);
    word_t w;
    w = '0;
    for (int unsigned o = 0; o < PAT_WIDTH; o++) if (PAT_MASK[p][o]) w[s+o] = 1'b1;
    return w;
  endfunction

  function automatic logic [63:0] rand64();
    return {$urandom(), $urandom()};
  endfunction

endpackage
