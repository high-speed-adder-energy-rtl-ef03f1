// tb_hvl_cska_cfg: the hybrid adder in two other configurations, to exercise
// the parts of the parameterisation the default does not reach:
//   cfg A: 24 bits, stages {3,5,8,5,3} (odd number of stages, so the last
//          skip gate is an OAI and the carry out needs no final inversion),
//          an 8-bit nucleus with no rows removed (plain Han-Carlson);
//   cfg B: 48 bits, fixed-size stages {8,8,16,8,8} around a 16-bit nucleus
//          with two Kogge-Stone rows removed.
// One operation at a time is applied to each; the sum, carry and latency
// class (nucleus fully propagating, or a truncated span fully propagating)
// are checked against values computed here.
module tb_hvl_cska_cfg;
  localparam int unsigned NOPS = 4000;
  localparam int unsigned NA = 24, NB = 48;
  localparam int unsigned MA [5] = '{3, 5, 8, 5, 3};
  localparam int unsigned MB [5] = '{8, 8, 16, 8, 8};

  logic clk = 1'b0, rst_n = 1'b0;
  logic va, ra, ova, ca, coa, sla;
  logic vb, rb, ovb, cb, cob, slb;
  logic [NA-1:0] aa, ba, sa;
  logic [NB-1:0] ab, bb, sb;
  int checks = 0, failures = 0;
  int slow_a = 0, slow_b = 0, fast_a = 0, fast_b = 0;

  hvl_cska #(.N(NA), .Q(5), .STAGE_M(MA), .NUC(2), .DROP(0)) dut_a (
    .clk(clk), .rst_n(rst_n), .in_valid(va), .in_ready(ra), .a(aa), .b(ba), .cin(ca),
    .out_valid(ova), .sum(sa), .cout(coa), .out_slow(sla));
  hvl_cska #(.N(NB), .Q(5), .STAGE_M(MB), .NUC(2), .DROP(2)) dut_b (
    .clk(clk), .rst_n(rst_n), .in_valid(vb), .in_ready(rb), .a(ab), .b(bb), .cin(cb),
    .out_valid(ovb), .sum(sb), .cout(cob), .out_slow(slb));

  always #5 clk = ~clk;

  initial begin
    repeat (20 * NOPS) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // 1 when bits [lo, hi] of x all propagate.
  function automatic bit all_p(input logic [63:0] x, input int lo, input int hi);
    for (int k = lo; k <= hi; k++) if (!x[k]) return 1'b0;
    return 1'b1;
  endfunction

  // Latency class: nucleus at [nlo, nlo+nm), span 2^(log2(nm)-drop).
  function automatic bit want_slow(input logic [63:0] pp, input int nlo, input int nm, input int span);
    bit s;
    s = all_p(pp, nlo, nlo + nm - 1);
    for (int i = span + 1; i < nm; i++)
      if (all_p(pp, nlo + ((i % 2 == 1) ? i - span + 1 : i - span), nlo + i)) s = 1'b1;
    return s;
  endfunction

  function automatic logic [63:0] pattern(input logic [63:0] x, input int n, input int nlo, input int nm);
    logic [63:0] y, m;
    y = {$urandom, $urandom};
    case ($urandom % 4)
      0: ;
      1: y = ~x;
      2: begin
        m = ((64'd1 << nm) - 1) << nlo;
        y = (y & ~m) | (~x & m);
      end
      default: begin
        m = 64'hff << (nlo + ($urandom % (nm - 7)));
        y = (y & ~m) | (~x & m);
      end
    endcase
    return y;
  endfunction

  initial begin
    va = 0; vb = 0; aa = '0; ba = '0; ab = '0; bb = '0; ca = 0; cb = 0;
    repeat (3) @(posedge clk);
    #1 rst_n = 1'b1;
    for (int n = 0; n < NOPS; n++) begin
      logic [63:0] x, y, r;
      int t0, lat;
      bit ws;
      // ---- configuration A
      x  = 64'({$urandom});
      y  = pattern(x, n, 8, 8);
      aa = NA'(x);
      ba = NA'(y);
      ca = 1'($urandom);
      va = 1'b1;
      @(posedge clk);
      #1 va = 1'b0;
      t0 = 0;
      while (!ova) begin
        @(posedge clk);
        #1 t0++;
      end
      r  = 64'(aa) + 64'(ba) + 64'(ca);
      ws = want_slow(64'(aa ^ ba), 8, 8, 8);
      lat = t0 + 1;
      checks++;
      if ({coa, sa} != r[NA:0] || sla != ws || lat != (ws ? 3 : 2)) begin
        failures++;
        $display("FAIL A a=%h b=%h ci=%0d got %h slow=%0d lat=%0d exp %h slow=%0d", aa, ba, ca, {coa, sa}, sla, lat, r[NA:0], ws);
      end
      if (ws) slow_a++; else fast_a++;
      // ---- configuration B
      x  = {$urandom, $urandom};
      y  = pattern(x, n, 16, 16);
      ab = NB'(x);
      bb = NB'(y);
      cb = 1'($urandom);
      vb = 1'b1;
      @(posedge clk);
      #1 vb = 1'b0;
      t0 = 0;
      while (!ovb) begin
        @(posedge clk);
        #1 t0++;
      end
      r  = 64'(ab) + 64'(bb) + 64'(cb);
      ws = want_slow(64'(ab ^ bb), 16, 16, 4);
      lat = t0 + 1;
      checks++;
      if ({cob, sb} != r[NB:0] || slb != ws || lat != (ws ? 3 : 2)) begin
        failures++;
        $display("FAIL B a=%h b=%h ci=%0d got %h slow=%0d lat=%0d exp %h slow=%0d", ab, bb, cb, {cob, sb}, slb, lat, r[NB:0], ws);
      end
      if (ws) slow_b++; else fast_b++;
    end
    checks++;
    if (slow_a == 0 || fast_a == 0 || slow_b == 0 || fast_b == 0) begin
      failures++;
      $display("FAIL a latency class never occurred");
    end
    $display("A: fast=%0d slow=%0d  B: fast=%0d slow=%0d", fast_a, slow_a, fast_b, slow_b);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
