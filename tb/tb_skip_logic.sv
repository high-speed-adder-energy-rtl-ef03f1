// tb_skip_logic: exhaustive test of both skip gate forms. The AOI form
// (true carry in) must give the inverse of g | p & ci; the OAI form (inverted
// carry in) must give g | p & ci in true polarity.
module tb_skip_logic;
  logic g, p, ci_t, ci_n, co_aoi, co_oai;
  int checks = 0, failures = 0;

  skip_logic #(.INV_IN(1'b0)) dut_aoi (.g(g), .p(p), .ci_pol(ci_t), .co_pol(co_aoi));
  skip_logic #(.INV_IN(1'b1)) dut_oai (.g(g), .p(p), .ci_pol(ci_n), .co_pol(co_oai));

  initial begin
    #1_000_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 8; v++) begin
      bit carry;
      g    = v[0];
      p    = v[1];
      ci_t = v[2];
      ci_n = ~v[2];
      #1;
      // carry out: the stage generates, or propagates an incoming carry
      carry = (v[0] == 1) || (v[1] == 1 && v[2] == 1);
      checks++;
      if (co_aoi != !carry) begin
        failures++;
        $display("FAIL AOI g=%0d p=%0d ci=%0d got %0d", g, p, ci_t, co_aoi);
      end
      checks++;
      if (co_oai != carry) begin
        failures++;
        $display("FAIL OAI g=%0d p=%0d ci=%0d got %0d", g, p, ci_t, co_oai);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
