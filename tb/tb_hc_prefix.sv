// tb_hc_prefix: self-checking test of the speculative Han-Carlson prefix
// network (M = 16) with 0, 1 and 2 Kogge-Stone rows removed.
//
// The reference computes each group generate/propagate by a plain loop over
// the bits of the group. For every instance it checks the exact outputs
// (G[i:0], P[i:0]), the truncated speculative outputs (spans of 2^(4-DROP)
// bits for odd bits, one more for even bits) and the error flag. Operands are
// random, with long propagate runs mixed in so that the error flag and real
// speculation errors both occur; their counts must be non-zero.
module tb_hc_prefix;
  localparam int unsigned M = 16;
  localparam int NDUT = 3;
  localparam int unsigned NVEC = 20000;

  logic [M-1:0] a, b, g, p;
  logic [M-1:0] gs [NDUT], ps [NDUT], ge [NDUT], pe [NDUT];
  logic         err [NDUT];
  int checks = 0, failures = 0;
  int err_seen [NDUT];
  int wrong_seen [NDUT];

  assign g = a & b;
  assign p = a ^ b;

  for (genvar d = 0; d < NDUT; d++) begin : g_dut
    hc_prefix #(.M(M), .DROP(d)) dut (
      .g(g), .p(p), .g_spec(gs[d]), .p_spec(ps[d]), .spec_err(err[d]),
      .g_exact(ge[d]), .p_exact(pe[d])
    );
  end

  // Group generate/propagate of bits hi..lo, by rippling from lo upwards.
  function automatic logic [1:0] grp(input logic [M-1:0] gg, input logic [M-1:0] pp,
                                     input int hi, input int lo);
    logic G, P;
    G = 1'b0;
    P = 1'b1;
    for (int k = lo; k <= hi; k++) begin
      G = gg[k] | (pp[k] & G);
      P = pp[k] & P;
    end
    return {G, P};
  endfunction

  initial begin
    #10_000_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int d = 0; d < NDUT; d++) begin
      err_seen[d]   = 0;
      wrong_seen[d] = 0;
    end
    for (int unsigned n = 0; n < NVEC; n++) begin
      a = M'($urandom);
      case (n % 3)
        0: b = M'($urandom);
        1: b = ~a ^ M'(1 << ($urandom % M));          // one break in the run
        default: b = ~a ^ (M'($urandom) & M'($urandom) & M'($urandom));
      endcase
      #1;
      for (int d = 0; d < NDUT; d++) begin
        int span;
        bit exp_err;
        logic [M-1:0] eg, ep, sg, sp;
        span    = 1 << (4 - d);
        exp_err = 1'b0;
        for (int i = 0; i < M; i++) begin
          logic [1:0] full, part;
          int lo;
          full  = grp(g, p, i, 0);
          eg[i] = full[1];
          ep[i] = full[0];
          if (i <= span) begin
            sg[i] = full[1];
            sp[i] = full[0];
          end else begin
            lo    = (i % 2 == 1) ? i - span + 1 : i - span;
            part  = grp(g, p, i, lo);
            sg[i] = part[1];
            sp[i] = 1'b0;
            if (part[0]) exp_err = 1'b1;
          end
        end
        checks++;
        if (ge[d] != eg || pe[d] != ep) begin
          failures++;
          $display("FAIL exact DROP=%0d a=%h b=%h", d, a, b);
        end
        checks++;
        if (gs[d] != sg || ps[d] != sp || err[d] != exp_err) begin
          failures++;
          $display("FAIL spec DROP=%0d a=%h b=%h gs=%h exp %h err=%0d exp %0d",
                   d, a, b, gs[d], sg, err[d], exp_err);
        end
        // With no error flagged the speculative carries must be exact.
        checks++;
        if (!err[d] && gs[d] != ge[d]) begin
          failures++;
          $display("FAIL unflagged speculation error DROP=%0d a=%h b=%h", d, a, b);
        end
        if (err[d]) err_seen[d]++;
        if (gs[d] != ge[d]) wrong_seen[d]++;
      end
    end
    // DROP = 0 is the full network: never flags and never differs.
    checks++;
    if (err_seen[0] != 0 || wrong_seen[0] != 0) begin
      failures++;
      $display("FAIL DROP=0 flagged %0d times", err_seen[0]);
    end
    for (int d = 1; d < NDUT; d++) begin
      checks++;
      if (err_seen[d] == 0 || wrong_seen[d] == 0) begin
        failures++;
        $display("FAIL DROP=%0d: speculation error never exercised", d);
      end
      $display("DROP=%0d: flagged %0d, really wrong %0d of %0d", d, err_seen[d], wrong_seen[d], NVEC);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
