// vl_controller: control of the variable latency adder.
//
// The operand register of the adder is loaded on a handshake (in_valid and
// in_ready). In the next cycle the combinational adder evaluates it and the
// controller looks at the predictor `slow`:
//   slow = 0  the result is stored at the end of this cycle (one cycle), and a
//             new operand pair may be loaded at the same edge;
//   slow = 1  the controller waits one more cycle (in_ready is 0, a stall) and
//             stores the result at the end of the second cycle, selecting the
//             exact sum (res_exact = 1).
// out_valid is a one-cycle pulse in the cycle after the result is stored.
// The consumer is assumed to take every result; there is no output
// back-pressure. Reset is asynchronous, active low.
module vl_controller (
  input  logic clk,
  input  logic rst_n,
  input  logic in_valid,
  output logic in_ready,
  input  logic slow,
  output logic op_load,    // load the operand register
  output logic res_load,   // store the adder result
  output logic res_exact,  // store the exact (second-cycle) result
  output logic out_valid,
  output logic out_slow    // the result now valid took two cycles
);
  logic op_valid_q;  // operand register holds an operation
  logic wait_q;      // operation is in its second cycle
  logic out_slow_q;
  logic done;

  assign done      = op_valid_q & (wait_q | ~slow);
  assign in_ready  = ~op_valid_q | done;
  assign op_load   = in_valid & in_ready;
  assign res_load  = done;
  assign res_exact = wait_q;
  assign out_slow  = out_slow_q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      op_valid_q <= 1'b0;
      wait_q     <= 1'b0;
      out_valid  <= 1'b0;
      out_slow_q <= 1'b0;
    end else begin
      if (op_load)   op_valid_q <= 1'b1;
      else if (done) op_valid_q <= 1'b0;
      wait_q     <= op_valid_q & slow & ~wait_q;
      out_valid  <= done;
      if (done) out_slow_q <= wait_q;
    end
  end

  // A waiting operation always completes in the next cycle.
  a_wait_has_op : assert property (@(posedge clk) disable iff (!rst_n) wait_q |-> op_valid_q);
  a_wait_done   : assert property (@(posedge clk) disable iff (!rst_n) wait_q |-> done);
  // No new operand is taken while an operation waits for its second cycle.
  a_no_load_in_wait : assert property (@(posedge clk) disable iff (!rst_n)
                                       (op_valid_q & slow & ~wait_q) |-> ~op_load);
endmodule
