// qaec_top -- encoder, error injection and decoder of the burst/quadruple-
// adjacent error-correcting code, wired as in the published simulation.
//
// data_in is encoded into the N-bit codeword enc_out (data in the low K
// bits, R check bits above). error_in is an N-bit upset mask standing for
// the bits a particle strike flips while the word sits in memory: the
// decoder sees enc_out ^ error_in and returns the corrected data on
// dec_out. Whenever error_in is zero, a single bit, or a 2-bit adjacent,
// 3-bit burst (101, 111) or 4-bit adjacent pattern anywhere in the word,
// dec_out equals data_in.
//
// Timing: fully combinational, no clock or reset, like the document's
// implementation, whose ports are in, enc_out, error_in and dec_out. Reading
// error_in as an XOR mask on the stored codeword is this design's choice.
module qaec_top
  import qaec_pkg::*;
#(
  parameter  int unsigned K = 16,
  localparam int unsigned R = check_bits(K),
  localparam int unsigned N = K + R
) (
  input  logic [K-1:0] data_in,
  input  logic [N-1:0] error_in,
  output logic [N-1:0] enc_out,
  output logic [K-1:0] dec_out
);

  logic [N-1:0] stored;

  qaec_encoder #(.K(K)) u_encoder (
    .data_i(data_in),
    .code_o(enc_out)
  );

  assign stored = enc_out ^ error_in;

  qaec_decoder #(.K(K)) u_decoder (
    .code_i(stored),
    .data_o(dec_out)
  );

endmodule
