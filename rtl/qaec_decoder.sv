// qaec_decoder -- single-step decoder of the burst/quadruple-adjacent
// error-correcting code defined in qaec_pkg.
//
// The received word goes through qaec_syndrome. The syndrome is compared in
// parallel with the precomputed syndrome of every correctable error pattern
// that touches a data bit: a single bit error, a double adjacent error (11),
// the two 3-bit bursts (101 and 111) and a quadruple adjacent error (1111),
// at every start position of the codeword, including patterns that straddle
// the data/check boundary. Because all these syndromes are distinct, at most
// one comparator fires; its pattern is XORed onto the data bits. A zero
// syndrome, or one that matches no pattern, leaves the data as received
// (errors outside the correctable set are neither corrected nor flagged).
//
// Timing: combinational (syndrome XOR trees, R-bit comparators, OR per data
// bit). Interface: code_i (N bits), data_o (K corrected data bits).
// A deferred assertion checks that at most one comparator fires.
// Follows the document: the set of correctable patterns and the codeword
// size. This design's own: the parity-check matrix and the comparator-based
// error locator, the document giving no decoder structure.
module qaec_decoder
  import qaec_pkg::*;
#(
  parameter  int unsigned K = 16,
  localparam int unsigned R = check_bits(K),
  localparam int unsigned N = K + R
) (
  input  logic [N-1:0] code_i,
  output logic [K-1:0] data_o
);

  logic [R-1:0] syn;

  qaec_syndrome #(.K(K)) u_syndrome (
    .code_i(code_i),
    .syn_o (syn)
  );

  // hit[p][s]: the syndrome equals that of pattern p starting at bit s.
  // Only start positions whose pattern reaches into the data bits matter.
  logic [NUM_PAT-1:0][K-1:0] hit;

  for (genvar p = 0; p < NUM_PAT; p++) begin : g_pat
    for (genvar s = 0; s < K; s++) begin : g_start
      localparam col_t SYN = pattern_syndrome(K, s, p);
      assign hit[p][s] = (syn == SYN[R-1:0]);
    end
  end

  // The syndromes of the correctable patterns are distinct, so no two
  // comparators may fire together.
  always_comb begin
    assert final ($onehot0(hit))
      else $error("qaec_decoder: several error patterns match syndrome %h", syn);
  end

  logic [K-1:0] flip;

  always_comb begin
    flip = '0;
    for (int p = 0; p < NUM_PAT; p++) begin
      for (int s = 0; s < K; s++) begin
        for (int o = 0; o < PAT_WIDTH; o++) begin
          if (PAT_MASK[p][o] && (s + o < K)) flip[s+o] = flip[s+o] | hit[p][s];
        end
      end
    end
  end

  assign data_o = code_i[K-1:0] ^ flip;

endmodule
