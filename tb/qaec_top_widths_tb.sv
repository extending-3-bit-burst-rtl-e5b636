// qaec_top_widths_tb -- end-to-end test of qaec_top for the two larger data
// widths the code is defined for: 32 data bits (40-bit codeword) and 64 data
// bits (73-bit codeword).
//
// For 30 random data words per width, error_in is zero and then every
// correctable upset pattern (1, 11, 101, 111, 1111) at every start
// position; dec_out must equal data_in and enc_out must carry the data in
// its low bits. 1 ns per vector.
module qaec_top_widths_tb;
  import qaec_pkg::*;
  import qaec_tb_pkg::*;

  logic [31:0] d32, q32;  logic [39:0] e32, c32;
  logic [63:0] d64, q64;  logic [72:0] e64, c64;

  qaec_top #(.K(32)) u_top32 (.data_in(d32), .error_in(e32), .enc_out(c32), .dec_out(q32));
  qaec_top #(.K(64)) u_top64 (.data_in(d64), .error_in(e64), .enc_out(c64), .dec_out(q64));

  int checks = 0, failures = 0;

  task automatic one(logic [63:0] d, word_t e);
    d32 = d[31:0]; e32 = e[39:0];
    d64 = d;       e64 = e[72:0];
    #1;
    checks += 4;
    if (q32 !== d32 || c32[31:0] !== d32) begin
      failures++; $display("FAIL K=32 d=%h e=%h got %h", d32, e32, q32);
    end
    if (q64 !== d64 || c64[63:0] !== d64) begin
      failures++; $display("FAIL K=64 d=%h e=%h got %h", d64, e64, q64);
    end
    if (ref_syndrome(32, word_t'(c32)) != '0) failures++;
    if (ref_syndrome(64, word_t'(c64)) != '0) failures++;
  endtask

  initial begin : watchdog
    #10000000;
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [63:0] d;
    for (int i = 0; i < 30; i++) begin
      d = rand64();
      one(d, '0);
      // patterns placed for the 73-bit word; the 40-bit top sees the same
      // pattern only where it fits, so the 32-bit case is run separately
      for (int unsigned p = 0; p < NUM_PAT; p++)
        for (int unsigned st = 0; st + pattern_span(p) <= 73; st++) begin
          if (st + pattern_span(p) <= 40) one(d, pattern_vec(st, p));
          else begin
            e32 = '0; d32 = d[31:0];
            d64 = d;  e64 = pattern_vec(st, p);
            #1;
            checks++;
            if (q64 !== d64) begin failures++; $display("FAIL K=64 d=%h e=%h got %h", d64, e64, q64); end
          end
        end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
