// qaec_top_tb -- end-to-end test of qaec_top at its default size (16 data
// bits, 23-bit codeword), with no parameter overrides.
//
// Data words: the word shown in the published waveform (56527), all-zero,
// all-one and 200 random words. For each, error_in is first zero and then
// every correctable upset pattern in turn, at every start position. Each
// time enc_out must carry the data unchanged in its low 16 bits and a zero
// syndrome (recomputed by the reference model), and dec_out must equal the
// data; the example word must encode to 3005647. The test counts how
// often each correction case occurred: no error,
// single, double adjacent, 101 burst, 111 burst, quadruple adjacent, a
// pattern straddling the data/check boundary, and one confined to the
// check bits. A case that never occurred counts as a failure.
module qaec_top_tb;
  import qaec_pkg::*;
  import qaec_tb_pkg::*;

  localparam int unsigned K = 16;
  localparam int unsigned N = 23;

  logic [K-1:0] data_in, dec_out;
  logic [N-1:0] error_in, enc_out;

  qaec_top dut (
    .data_in (data_in),
    .error_in(error_in),
    .enc_out (enc_out),
    .dec_out (dec_out)
  );

  int checks = 0, failures = 0;
  int count_case [string];

  task automatic one(logic [K-1:0] d, logic [N-1:0] e, string what);
    data_in  = d;
    error_in = e;
    #1;
    checks += 3;
    if (enc_out[K-1:0] !== d) begin failures++; $display("FAIL %s: data field %h", what, enc_out[K-1:0]); end
    if (ref_syndrome(K, word_t'(enc_out)) != '0) begin failures++; $display("FAIL %s: codeword %h", what, enc_out); end
    if (dec_out !== d) begin
      failures++;
      $display("FAIL %s: in %h error_in %h dec_out %h", what, d, e, dec_out);
    end
    if (count_case.exists(what)) count_case[what]++;
    else count_case[what] = 1;
  endtask

  task automatic all_patterns(logic [K-1:0] d);
    string name [NUM_PAT] = '{"single", "double_adjacent", "burst_101", "burst_111", "quadruple_adjacent"};
    logic [N-1:0] e;
    one(d, '0, "no_error");
    for (int unsigned p = 0; p < NUM_PAT; p++) begin
      for (int unsigned st = 0; st + pattern_span(p) <= N; st++) begin
        e = N'(pattern_vec(st, p));
        one(d, e, name[p]);
        if (st < K && st + pattern_span(p) > K) count_case["straddles_boundary"]++;
        if (st >= K) count_case["check_bits_only"]++;
      end
    end
  endtask

  initial begin : watchdog
    #10000000;
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    static string cases [8] = '{"no_error", "single", "double_adjacent", "burst_101", "burst_111",
                         "quadruple_adjacent", "straddles_boundary", "check_bits_only"};
    count_case["straddles_boundary"] = 0;
    count_case["check_bits_only"] = 0;
    // example word of the published implementation: 56527 -> 3005647
    data_in  = 16'd56527;
    error_in = '0;
    #1;
    checks++;
    if (enc_out !== 23'd3005647) begin failures++; $display("FAIL example codeword %0d", enc_out); end
    all_patterns(16'd56527);
    all_patterns('0);
    all_patterns('1);
    for (int i = 0; i < 200; i++) all_patterns(16'($urandom()));
    foreach (cases[c]) begin
      checks++;
      if (!count_case.exists(cases[c]) || count_case[cases[c]] == 0) begin
        failures++;
        $display("FAIL case %s never occurred", cases[c]);
      end else begin
        $display("case %-20s %0d", cases[c], count_case[cases[c]]);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
