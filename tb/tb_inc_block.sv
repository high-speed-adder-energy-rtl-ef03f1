// tb_inc_block: exhaustive self-checking test of the incrementation block:
// s_out must equal (s_in + ci) mod 2^M for every s_in and ci (M = 4).
module tb_inc_block;
  localparam int unsigned M = 4;
  logic [M-1:0] s_in, s_out;
  logic         ci;
  int checks = 0, failures = 0;

  inc_block #(.M(M)) dut (.s_in(s_in), .ci(ci), .s_out(s_out));

  initial begin
    #1_000_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < (1 << M); v++)
      for (int c = 0; c < 2; c++) begin
        int unsigned expv;
        s_in = M'(v);
        ci   = 1'(c);
        #1;
        expv = (v + c) % (1 << M);
        checks++;
        if (s_out != M'(expv)) begin
          failures++;
          $display("FAIL s_in=%h ci=%0d got %h exp %h", s_in, ci, s_out, expv);
        end
      end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
