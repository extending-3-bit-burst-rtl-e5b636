// qaec_encoder_tb -- self-checking test of qaec_encoder at all three code
// sizes (16, 32 and 64 data bits).
//
// Every unit data word (which must produce exactly one H column as check
// bits), the all-ones word and 2000 random words per size are encoded and
// compared with the column-wise reference encoder of qaec_tb_pkg, and the
// published example (data 56527 gives codeword 3005647) is checked. The data
// field of the codeword must equal the input, and the syndrome of every
// codeword, recomputed by the reference, must be zero. The encoder is
// combinational; each vector is given 1 ns to settle.
module qaec_encoder_tb;
  import qaec_pkg::*;
  import qaec_tb_pkg::*;

  logic [15:0] d16;  logic [22:0] c16;
  logic [31:0] d32;  logic [39:0] c32;
  logic [63:0] d64;  logic [72:0] c64;

  qaec_encoder #(.K(16)) u_enc16 (.data_i(d16), .code_o(c16));
  qaec_encoder #(.K(32)) u_enc32 (.data_i(d32), .code_o(c32));
  qaec_encoder #(.K(64)) u_enc64 (.data_i(d64), .code_o(c64));

  int checks = 0, failures = 0;

  task automatic check_all(logic [63:0] d);
    word_t e16, e32, e64;
    d16 = d[15:0]; d32 = d[31:0]; d64 = d;
    #1;
    e16 = ref_encode(16, d); e32 = ref_encode(32, d); e64 = ref_encode(64, d);
    checks += 3;
    if (c16 !== e16[22:0]) begin failures++; $display("FAIL K=16 d=%h got %h exp %h", d16, c16, e16[22:0]); end
    if (c32 !== e32[39:0]) begin failures++; $display("FAIL K=32 d=%h got %h exp %h", d32, c32, e32[39:0]); end
    if (c64 !== e64[72:0]) begin failures++; $display("FAIL K=64 d=%h got %h exp %h", d64, c64, e64[72:0]); end
    checks += 3;
    if (ref_syndrome(16, word_t'(c16)) != '0) failures++;
    if (ref_syndrome(32, word_t'(c32)) != '0) failures++;
    if (ref_syndrome(64, word_t'(c64)) != '0) failures++;
  endtask

  initial begin : watchdog
    #100000;
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    check_all('0);
    check_all('1);
    for (int j = 0; j < 64; j++) check_all(64'(1) << j);
    // example word of the published implementation: 56527 -> 3005647
    d16 = 16'd56527;
    #1;
    checks++;
    if (c16 !== 23'd3005647) begin failures++; $display("FAIL example word: %0d", c16); end
    for (int i = 0; i < 2000; i++) check_all(rand64());
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
