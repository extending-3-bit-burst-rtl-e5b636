// qaec_syndrome_tb -- self-checking test of qaec_syndrome at all three code
// sizes, which also checks the code itself.
//
// 1. Random codewords from the reference encoder must give a zero syndrome.
// 2. Every correctable error pattern (1, 11, 101, 111, 1111) at every start
//    position of the codeword is applied on its own; the syndrome must
//    equal the reference syndrome, be nonzero and differ from the syndromes
//    of all other patterns (107, 192 and 357 patterns for K = 16, 32, 64).
// 3. Random codewords with a random pattern added must give the syndrome of
//    the pattern alone (linearity).
// Combinational block; each vector is given 1 ns to settle.
module qaec_syndrome_tb;
  import qaec_pkg::*;
  import qaec_tb_pkg::*;

  logic [22:0] w16;  logic [6:0] s16;
  logic [39:0] w32;  logic [7:0] s32;
  logic [72:0] w64;  logic [8:0] s64;

  qaec_syndrome #(.K(16)) u_syn16 (.code_i(w16), .syn_o(s16));
  qaec_syndrome #(.K(32)) u_syn32 (.code_i(w32), .syn_o(s32));
  qaec_syndrome #(.K(64)) u_syn64 (.code_i(w64), .syn_o(s64));

  int checks = 0, failures = 0;

  task automatic apply(int unsigned k, word_t w, output col_t s);
    w16 = w[22:0]; w32 = w[39:0]; w64 = w[72:0];
    #1;
    case (k)
      16:      s = col_t'(s16);
      32:      s = col_t'(s32);
      default: s = col_t'(s64);
    endcase
  endtask

  task automatic run_size(int unsigned k);
    int unsigned n = k + check_bits(k);
    bit seen [col_t];
    col_t s;
    word_t w, e;
    int unsigned npat = 0;
    for (int i = 0; i < 300; i++) begin
      apply(k, ref_encode(k, rand64()), s);
      checks++;
      if (s != '0) begin failures++; $display("FAIL K=%0d codeword syndrome %h", k, s); end
    end
    for (int unsigned p = 0; p < NUM_PAT; p++) begin
      for (int unsigned st = 0; st + pattern_span(p) <= n; st++) begin
        e = pattern_vec(st, p);
        apply(k, e, s);
        npat++;
        checks++;
        if (s == '0 || seen.exists(s) || s != ref_syndrome(k, e)) begin
          failures++;
          $display("FAIL K=%0d pattern %0d at %0d syndrome %h", k, p, st, s);
        end
        seen[s] = 1'b1;
        w = ref_encode(k, rand64()) ^ e;
        apply(k, w, s);
        checks++;
        if (s != ref_syndrome(k, e)) begin failures++; $display("FAIL K=%0d linearity", k); end
      end
    end
    $display("K=%0d: %0d correctable patterns, %0d distinct syndromes", k, npat, seen.size());
  endtask

  initial begin : watchdog
    #1000000;
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
