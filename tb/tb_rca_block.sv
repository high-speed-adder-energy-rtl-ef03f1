// tb_rca_block: exhaustive self-checking test of the ripple-carry block.
// Every a, b (M = 4 bits) and carry input is applied; sum, carry out and the
// propagate product are compared with integer addition and a bitwise
// reduction computed here.
module tb_rca_block;
  localparam int unsigned M = 4;
  logic [M-1:0] a, b, s;
  logic         ci, co, p_all;
  int checks = 0, failures = 0;

  rca_block #(.M(M)) dut (.a(a), .b(b), .ci(ci), .s(s), .co(co), .p_all(p_all));

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
          int unsigned ref_sum;
          bit          ref_p;
          a  = M'(ia);
          b  = M'(ib);
          ci = 1'(ic);
          #1;
          ref_sum = ia + ib + ic;
          ref_p   = 1'b1;
          for (int k = 0; k < M; k++) if (a[k] == b[k]) ref_p = 1'b0;
          checks++;
          if ({co, s} != (M + 1)'(ref_sum)) begin
            failures++;
            $display("FAIL sum a=%h b=%h ci=%0d got %0d exp %0d", a, b, ci, {co, s}, ref_sum);
          end
          checks++;
          if (p_all != ref_p) begin
            failures++;
            $display("FAIL p_all a=%h b=%h got %0d", a, b, p_all);
          end
        end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
