// tb_hc_nucleus_stage: self-checking test of the 16-bit Han-Carlson nucleus
// stage, with a true-polarity and an inverted-polarity carry input.
//
// For random and long-propagate-run operands it checks, against integer
// addition: the exact sums, the stage carry out (in the polarity of the skip
// gate), the predictor p_all (all bits propagate) and that the speculative
// sums equal the exact ones whenever spec_err is 0. The skip case
// (p_all = 1), the error flag and a real speculative sum error must each
// occur at least once.
module tb_hc_nucleus_stage;
  localparam int unsigned M = 16;
  localparam int unsigned NVEC = 20000;

  logic [M-1:0] a, b, ss0, se0, ss1, se1;
  logic         ci, ci_n, co0, co1, pa0, pa1, er0, er1;
  int checks = 0, failures = 0;
  int n_skip = 0, n_err = 0, n_wrong = 0;

  hc_nucleus_stage #(.M(M), .DROP(1), .INV_IN(1'b0)) dut0 (
    .a(a), .b(b), .ci_pol(ci), .s_spec(ss0), .s_exact(se0), .co_pol(co0),
    .p_all(pa0), .spec_err(er0));
  hc_nucleus_stage #(.M(M), .DROP(1), .INV_IN(1'b1)) dut1 (
    .a(a), .b(b), .ci_pol(ci_n), .s_spec(ss1), .s_exact(se1), .co_pol(co1),
    .p_all(pa1), .spec_err(er1));

  initial begin
    #10_000_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int unsigned n = 0; n < NVEC; n++) begin
      logic [M:0] r;
      bit         rp;
      a = M'($urandom);
      case (n % 4)
        0: b = M'($urandom);
        1: b = ~a;                                    // full propagate: skip
        2: b = ~a ^ M'(1 << ($urandom % M));
        default: b = ~a ^ (M'($urandom) & M'($urandom) & M'($urandom));
      endcase
      ci   = 1'($urandom);
      ci_n = ~ci;
      #1;
      r  = (M + 1)'(a) + (M + 1)'(b) + (M + 1)'(ci);
      rp = ((a ^ b) == '1);
      checks++;
      if (se0 != r[M-1:0] || co0 != ~r[M] || pa0 != rp) begin
        failures++;
        $display("FAIL true-in a=%h b=%h ci=%0d s=%h co_n=%0d p=%0d exp %h", a, b, ci, se0, co0, pa0, r);
      end
      checks++;
      if (se1 != r[M-1:0] || co1 != r[M] || pa1 != rp) begin
        failures++;
        $display("FAIL inv-in a=%h b=%h ci=%0d s=%h co=%0d exp %h", a, b, ci, se1, co1, r);
      end
      checks++;
      if ((!er0 && ss0 != r[M-1:0]) || (!er1 && ss1 != r[M-1:0]) || er0 != er1) begin
        failures++;
        $display("FAIL speculative a=%h b=%h ci=%0d s_spec=%h err=%0d", a, b, ci, ss0, er0);
      end
      if (rp) n_skip++;
      if (er0) n_err++;
      if (ss0 != r[M-1:0]) n_wrong++;
    end
    checks++;
    if (n_skip == 0 || n_err == 0 || n_wrong == 0) begin
      failures++;
      $display("FAIL a mechanism was not exercised");
    end
    $display("skip=%0d err_flag=%0d spec_wrong=%0d of %0d", n_skip, n_err, n_wrong, NVEC);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
