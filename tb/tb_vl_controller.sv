// tb_vl_controller: self-checking test of the variable latency controller.
//
// A stream of operations is offered with random gaps; each carries a
// predictor bit that the testbench presents on `slow` while that operation is
// held. The testbench checks that every operation completes exactly one
// cycle (slow = 0) or two cycles (slow = 1) after it was loaded, that
// res_exact marks exactly the two-cycle ones, that out_valid/out_slow follow
// one cycle later, that in_ready drops only during the first cycle of a
// two-cycle operation, and that a fast operation can be followed by a load at
// the same edge (one operation per cycle). Each case must occur.
module tb_vl_controller;
  localparam int unsigned NOPS = 2000;

  logic clk = 1'b0, rst_n = 1'b0;
  logic in_valid, in_ready, slow, op_load, res_load, res_exact, out_valid, out_slow;
  int checks = 0, failures = 0;
  int cycle = 0;

  vl_controller dut (
    .clk(clk), .rst_n(rst_n), .in_valid(in_valid), .in_ready(in_ready), .slow(slow),
    .op_load(op_load), .res_load(res_load), .res_exact(res_exact),
    .out_valid(out_valid), .out_slow(out_slow));

  always #5 clk = ~clk;

  initial begin
    repeat (20 * NOPS) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  bit op_slow [NOPS];
  int load_cycle [NOPS];
  int next_in = 0, held = -1, out_cnt = 0;
  bit exp_out_valid = 1'b0, exp_out_slow = 1'b0;
  int n_fast = 0, n_slow = 0, n_stall = 0, n_b2b = 0;

  initial begin
    for (int i = 0; i < NOPS; i++) op_slow[i] = ($urandom % 3) == 0;
    in_valid = 1'b0;
    slow     = 1'b0;
    repeat (3) @(posedge clk);
    #1 rst_n = 1'b1;
    while (out_cnt < NOPS) begin
      bit s_load, s_done;
      // drive inputs just after the edge
      #1;
      in_valid = (next_in < NOPS) && ((next_in % 64) < 24 || ($urandom % 4) != 0);
      slow     = (held >= 0) ? op_slow[held] : 1'($urandom);
      #3;
      // check outputs just before the next edge
      checks++;
      if (out_valid != exp_out_valid || (exp_out_valid && out_slow != exp_out_slow)) begin
        failures++;
        $display("FAIL cycle %0d: out_valid=%0d out_slow=%0d, expected %0d/%0d",
                 cycle, out_valid, out_slow, exp_out_valid, exp_out_slow);
      end
      if (out_valid) out_cnt++;
      s_done = 1'b0;
      if (held >= 0) begin
        int lat, want;
        lat  = cycle + 1 - load_cycle[held];   // edges since the load, including the next
        want = op_slow[held] ? 2 : 1;
        checks++;
        if (res_load != (lat == want) || (res_load && res_exact != op_slow[held])) begin
          failures++;
          $display("FAIL op %0d: res_load=%0d at latency %0d, want %0d", held, res_load, lat, want);
        end
        checks++;
        if (in_ready != res_load) begin
          failures++;
          $display("FAIL cycle %0d: in_ready=%0d while holding op %0d", cycle, in_ready, held);
        end
        if (!in_ready && in_valid) n_stall++;
        s_done = res_load;
      end else begin
        checks++;
        if (!in_ready || res_load) begin
          failures++;
          $display("FAIL cycle %0d: idle controller not ready or storing", cycle);
        end
      end
      checks++;
      if (op_load != (in_valid && in_ready)) begin
        failures++;
        $display("FAIL cycle %0d: op_load", cycle);
      end
      s_load = op_load;
      @(posedge clk);
      cycle++;
      exp_out_valid = s_done;
      if (s_done) begin
        exp_out_slow = op_slow[held];
        if (op_slow[held]) n_slow++; else n_fast++;
        if (s_load && !op_slow[held]) n_b2b++;
        held = -1;
      end
      if (s_load) begin
        held = next_in;
        load_cycle[next_in] = cycle;
        next_in++;
      end
    end
    checks++;
    if (n_fast == 0 || n_slow == 0 || n_stall == 0 || n_b2b == 0) begin
      failures++;
      $display("FAIL a case never occurred");
    end
    $display("fast=%0d slow=%0d stalled_cycles=%0d back_to_back=%0d", n_fast, n_slow, n_stall, n_b2b);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
