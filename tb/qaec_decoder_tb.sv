// qaec_decoder_tb -- self-checking test of qaec_decoder at all three code
// sizes (16, 32 and 64 data bits).
//
// For 40 random data words per size, the reference codeword is applied
// unchanged and then with every correctable error pattern (single, 11, 101,
// 111, 1111) at every start position, including patterns that straddle the
// data/check boundary or lie in the check bits only. The decoded data must
// equal the original every time. Combinational block; 1 ns per vector.
module qaec_decoder_tb;
  import qaec_pkg::*;
  import qaec_tb_pkg::*;

  logic [22:0] w16;  logic [15:0] d16;
  logic [39:0] w32;  logic [31:0] d32;
  logic [72:0] w64;  logic [63:0] d64;

  qaec_decoder #(.K(16)) u_dec16 (.code_i(w16), .data_o(d16));
  qaec_decoder #(.K(32)) u_dec32 (.code_i(w32), .data_o(d32));
  qaec_decoder #(.K(64)) u_dec64 (.code_i(w64), .data_o(d64));

  int checks = 0, failures = 0;

  task automatic one(int unsigned k, logic [63:0] d, word_t w, int unsigned p, int unsigned st);
    logic [63:0] got;
    w16 = w[22:0]; w32 = w[39:0]; w64 = w[72:0];
    #1;
    case (k)
      16:      got = 64'(d16);
      32:      got = 64'(d32);
      default: got = d64;
    endcase
    checks++;
    if (got != d) begin
      failures++;
      if (failures < 20) $display("FAIL K=%0d pattern %0d at %0d: data %h decoded %h", k, p, st, d, got);
    end
  endtask

  task automatic run_size(int unsigned k);
    int unsigned n = k + check_bits(k);
    logic [63:0] d;
    word_t w;
    for (int i = 0; i < 40; i++) begin
      d = rand64();
      if (k < 64) d &= (64'(1) << k) - 1;
      w = ref_encode(k, d);
      one(k, d, w, 99, 0);
      for (int unsigned p = 0; p < NUM_PAT; p++)
        for (int unsigned st = 0; st + pattern_span(p) <= n; st++)
          one(k, d, w ^ pattern_vec(st, p), p, st);
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
    run_size(16);
    run_size(32);
    run_size(64);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
