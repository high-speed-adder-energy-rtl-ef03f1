// tb_ci_cska_stage: exhaustive test of a concatenation/incrementation stage
// (M = 4) in both carry polarities. For every a, b and carry input the sum
// slice and stage carry out must match integer addition, the carry out in the
// polarity the skip gate produces. It also counts how often the carry was
// skipped (p_all = 1 with carry 1), which must happen.
module tb_ci_cska_stage;
  localparam int unsigned M = 4;
  logic [M-1:0] a, b, s0, s1;
  logic         ci, ci_n, co0, co1, p0, p1;
  int checks = 0, failures = 0, skips = 0;

  ci_cska_stage #(.M(M), .INV_IN(1'b0)) dut0 (.a(a), .b(b), .ci_pol(ci),   .s(s0), .co_pol(co0), .p_all(p0));
  ci_cska_stage #(.M(M), .INV_IN(1'b1)) dut1 (.a(a), .b(b), .ci_pol(ci_n), .s(s1), .co_pol(co1), .p_all(p1));

  initial begin
    #1_000_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int ia = 0; ia < (1 << M); ia++)
      for (int ib = 0; ib < (1 << M); ib++)
        for (int ic = 0; ic < 2; ic++) begin
          int unsigned r;
          bit          rc;
          a    = M'(ia);
          b    = M'(ib);
          ci   = 1'(ic);
          ci_n = ~1'(ic);
          #1;
          r  = ia + ib + ic;
          rc = (r >> M) != 0;
          if ((ia ^ ib) == (1 << M) - 1 && ic == 1) skips++;
          checks++;
          if (s0 != M'(r) || co0 != !rc) begin
            failures++;
            $display("FAIL true-in a=%h b=%h ci=%0d: s=%h co_n=%0d exp %h", a, b, ci, s0, co0, M'(r));
          end
          checks++;
          if (s1 != M'(r) || co1 != rc) begin
            failures++;
            $display("FAIL inv-in a=%h b=%h ci=%0d: s=%h co=%0d exp %h", a, b, ci, s1, co1, M'(r));
          end
          checks++;
          if (p0 != ((ia ^ ib) == (1 << M) - 1) || p1 != p0) begin
            failures++;
            $display("FAIL p_all a=%h b=%h", a, b);
          end
        end
    checks++;
    if (skips == 0) begin
      failures++;
      $display("FAIL no skip case applied");
    end
    $display("skips=%0d", skips);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
