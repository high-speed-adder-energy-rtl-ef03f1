// tb_hvl_cska: end-to-end test of the hybrid variable latency carry skip
// adder at its default configuration (32 bits, stages {2,3,4,16,4,3}, a
// 16-bit speculative Han-Carlson nucleus with one Kogge-Stone row removed).
//
// Operations are offered on the input handshake with random gaps. Operands
// mix uniform random values with patterns that make whole stages, the whole
// nucleus, 8-bit runs inside the nucleus or the whole word propagate. Every
// result is checked against 64-bit integer addition, in order. The expected
// latency class is worked out here from the operands (nucleus fully
// propagating, or a truncated span of the speculative network fully
// propagating) and checked on out_slow and on the cycle count: 2 edges from
// load to out_valid for a one-cycle operation, 3 for a two-cycle one.
// The testbench counts, and requires at least once: one-cycle and two-cycle
// operations, two-cycle operations caused by the skip predictor and by the
// speculation check alone, a carry skipping each stage, an incrementation
// that rolls over a whole stage, input stalls, back-to-back one-cycle
// operations, and a carry out of the adder.
module tb_hvl_cska;
  import cska_pkg::*;
  localparam int unsigned N    = 32;
  localparam int unsigned Q    = Q_DEFAULT;
  localparam int unsigned NOPS = 20000;

  logic         clk = 1'b0, rst_n = 1'b0;
  logic         in_valid, in_ready, cin, out_valid, cout, out_slow;
  logic [N-1:0] a, b, sum;
  int checks = 0, failures = 0, cycle = 0;

  hvl_cska dut (
    .clk(clk), .rst_n(rst_n), .in_valid(in_valid), .in_ready(in_ready),
    .a(a), .b(b), .cin(cin), .out_valid(out_valid), .sum(sum), .cout(cout),
    .out_slow(out_slow));

  always #5 clk = ~clk;

  initial begin
    repeat (10 * NOPS) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int lo_of [Q + 1];
  int nuc_lo, nuc_m;

  // Expected result queue.
  logic [N:0] exp_res  [$];
  bit         exp_slow [$];
  int         exp_load [$];

  // Mechanism counters.
  int n_fast = 0, n_slow = 0, n_slow_skip = 0, n_slow_spec = 0;
  int n_skip [Q];
  int n_roll = 0, n_stall = 0, n_b2b = 0, n_cout = 0;

  // Latency class predicted from the operands.
  function automatic bit predict_slow(input logic [N-1:0] x, input logic [N-1:0] y,
                                      output bit by_skip);
    logic [N-1:0] pp;
    int span;
    bit s;
    pp      = x ^ y;
    span    = nuc_m / 2;      // one Kogge-Stone row removed
    by_skip = 1'b1;
    for (int i = 0; i < nuc_m; i++) if (!pp[nuc_lo + i]) by_skip = 1'b0;
    s = by_skip;
    for (int i = span + 1; i < nuc_m; i++) begin
      int lo;
      bit allp;
      lo   = (i % 2 == 1) ? i - span + 1 : i - span;
      allp = 1'b1;
      for (int k = lo; k <= i; k++) if (!pp[nuc_lo + k]) allp = 1'b0;
      if (allp) s = 1'b1;
    end
    return s;
  endfunction

  // Make bits [lo, lo+len) of y propagate against x.
  function automatic logic [N-1:0] force_prop(input logic [N-1:0] x, input logic [N-1:0] y,
                                              input int lo, input int len);
    logic [N-1:0] m;
    m = '0;
    for (int k = 0; k < len; k++) if (lo + k < N) m[lo + k] = 1'b1;
    return (y & ~m) | (~x & m);
  endfunction

  // Output checker: runs on every edge.
  always @(posedge clk) begin
    if (rst_n) begin
      cycle++;
      if (out_valid) begin
        checks++;
        if (exp_res.size() == 0) begin
          failures++;
          $display("FAIL cycle %0d: unexpected result", cycle);
        end else begin
          logic [N:0] r;
          bit         sl;
          int         ld, lat;
          r   = exp_res.pop_front();
          sl  = exp_slow.pop_front();
          ld  = exp_load.pop_front();
          lat = cycle - ld;
          if ({cout, sum} != r) begin
            failures++;
            $display("FAIL sum: got %h exp %h", {cout, sum}, r);
          end
          checks++;
          if (out_slow != sl || lat != (sl ? 3 : 2)) begin
            failures++;
            $display("FAIL latency: out_slow=%0d exp %0d, %0d edges", out_slow, sl, lat);
          end
          if (sl) n_slow++; else n_fast++;
          if (r[N]) n_cout++;
        end
      end
    end
  end

  initial begin
    int issued;
    bit prev_fast_load;
    int prev_load_cycle;
    lo_of[0] = 0;
    for (int j = 0; j < Q; j++) begin
      lo_of[j + 1] = lo_of[j] + M_DEFAULT[j];
      n_skip[j]    = 0;
    end
    nuc_lo = lo_of[NUC_DEFAULT];
    nuc_m  = M_DEFAULT[NUC_DEFAULT];
    in_valid = 1'b0;
    a = '0;
    b = '0;
    cin = 1'b0;
    issued = 0;
    prev_fast_load  = 1'b0;
    prev_load_cycle = -10;
    repeat (3) @(posedge clk);
    #1 rst_n = 1'b1;
    while (issued < NOPS) begin
      bit by_skip, sl;
      logic [N:0] r;
      logic [63:0] full;
      // new operands
      a   = N'($urandom);
      b   = N'($urandom);
      cin = 1'($urandom);
      case ($urandom % 8)
        0, 1, 2: ;
        3: begin
          int j;
          j = $urandom % Q;
          b = force_prop(a, b, lo_of[j], M_DEFAULT[j]);
        end
        4: b = force_prop(a, b, nuc_lo, nuc_m);
        5: b = force_prop(a, b, nuc_lo + 2 + ($urandom % 7), 8);
        6: b = ~a;
        default: begin
          int j;
          j = $urandom % Q;
          b = force_prop(a, b, 0, lo_of[j + 1]);
          b = force_prop(a, b, lo_of[j], M_DEFAULT[j]);
        end
      endcase
      in_valid = ($urandom % 5) != 0;
      #4;
      if (in_valid) begin
        if (!in_ready) n_stall++;
        // wait for the handshake
        while (!in_ready) begin
          @(posedge clk);
          #4;
        end
        full = 64'(a) + 64'(b) + 64'(cin);
        r    = full[N:0];
        sl   = predict_slow(a, b, by_skip);
        exp_res.push_back(r);
        exp_slow.push_back(sl);
        exp_load.push_back(cycle + 1);
        if (sl && by_skip) n_slow_skip++;
        if (sl && !by_skip) n_slow_spec++;
        if (prev_fast_load && prev_load_cycle == cycle) n_b2b++;
        prev_fast_load  = !sl;
        prev_load_cycle = cycle + 1;
        // stage-level events
        for (int j = 1; j < Q; j++) begin
          logic [63:0] low, pj;
          bit c_in, allp;
          low  = (64'(a) & ((64'd1 << lo_of[j]) - 1)) + (64'(b) & ((64'd1 << lo_of[j]) - 1)) + 64'(cin);
          c_in = low[lo_of[j]];
          pj   = 64'(a ^ b) >> lo_of[j];
          allp = 1'b1;
          for (int k = 0; k < M_DEFAULT[j]; k++) if (!pj[k]) allp = 1'b0;
          if (c_in && allp) n_skip[j]++;
          // incrementation rolling over the whole RCA sum of a stage
          if (c_in && j != NUC_DEFAULT && allp) n_roll++;
        end
        issued++;
      end
      @(posedge clk);
      #0;
    end
    in_valid = 1'b0;
    // drain
    repeat (10) @(posedge clk);
    checks++;
    if (exp_res.size() != 0) begin
      failures++;
      $display("FAIL %0d results missing", exp_res.size());
    end
    $display("fast=%0d slow=%0d (skip predictor %0d, speculation check only %0d)",
             n_fast, n_slow, n_slow_skip, n_slow_spec);
    $display("stalls=%0d back_to_back=%0d incrementer_rollover=%0d carry_out=%0d",
             n_stall, n_b2b, n_roll, n_cout);
    for (int j = 1; j < Q; j++) $display("stage %0d skipped %0d times", j, n_skip[j]);
    checks++;
    if (n_fast == 0 || n_slow_skip == 0 || n_slow_spec == 0 || n_stall == 0 ||
        n_b2b == 0 || n_roll == 0 || n_cout == 0) begin
      failures++;
      $display("FAIL a mechanism never occurred");
    end
    for (int j = 1; j < Q; j++) begin
      checks++;
      if (n_skip[j] == 0) begin
        failures++;
        $display("FAIL stage %0d never skipped", j);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
