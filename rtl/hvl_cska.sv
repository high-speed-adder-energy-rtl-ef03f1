// hvl_cska: hybrid variable latency carry skip adder (N = 32 bits by default).
//
// Datapath. The N bits are split into Q stages (sizes STAGE_M, LSB first):
//   stage 0        a ripple-carry block fed by the adder carry input cin;
//   stage NUC      the nucleus: a speculative Han-Carlson prefix stage whose
//                  skip logic passes the carry on and whose propagate product
//                  P is the latency predictor;
//   other stages   concatenation/incrementation stages: an RCA block with
//                  carry-in 0, an incrementation block and the skip logic.
// The stage carries pass only through the skip logic, one compound gate per
// stage, alternating AOI and OAI so that the carry polarity flips from stage
// to stage; the final carry is restored to true polarity.
//
// Variable latency. Operands are registered on an in_valid/in_ready
// handshake. The adder is given one clock cycle, unless the predictor
// slow = P(nucleus) | spec_err is 1: P(nucleus) = 1 means the carry skips the
// nucleus and the long carry paths that start below it and end above it may
// be active; spec_err = 1 means a truncated speculative carry inside the
// nucleus may be wrong. Then the operation takes two cycles (in_ready drops
// for one cycle) and the exact nucleus sums are stored. sum/cout are valid
// while out_valid is 1 (one cycle after the result is stored); out_slow tells
// that the result took two cycles.
//
// Follows the source description: the concatenation/incrementation stages,
// AOI/OAI skip gates, a power-of-two prefix nucleus in the middle whose P is
// the predictor, a Han-Carlson nucleus made speculative by removing its last
// Kogge-Stone rows. This design's own choices: N = 32, the stage sizes
// {2,3,4,16,4,3}, one removed row, the error test, the handshake and the
// clocking. Reset is asynchronous, active low.
module hvl_cska #(
  parameter int unsigned N    = 32,
  parameter int unsigned Q    = cska_pkg::Q_DEFAULT,
  parameter int unsigned STAGE_M [Q] = cska_pkg::M_DEFAULT,
  parameter int unsigned NUC  = cska_pkg::NUC_DEFAULT,
  parameter int unsigned DROP = cska_pkg::DROP_DEFAULT
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         in_valid,
  output logic         in_ready,
  input  logic [N-1:0] a,
  input  logic [N-1:0] b,
  input  logic         cin,
  output logic         out_valid,
  output logic [N-1:0] sum,
  output logic         cout,
  output logic         out_slow
);
  // Lowest bit of stage j.
  function automatic int unsigned stage_lo(input int unsigned j);
    int unsigned lo;
    lo = 0;
    for (int unsigned k = 0; k < j; k++) lo += STAGE_M[k];
    return lo;
  endfunction

  if (stage_lo(Q) != N) begin : g_bad_sizes
    $error("hvl_cska: stage sizes must add up to N");
  end
  if (NUC == 0 || NUC >= Q) begin : g_bad_nuc
    $error("hvl_cska: the nucleus must be a stage other than the first");
  end

  // ---------------------------------------------------------------- registers
  logic [N-1:0] a_q, b_q, sum_fast, sum_exact;
  logic         cin_q, cout_c;
  logic         op_load, res_load, res_exact;
  logic         p_nuc, spec_err, slow;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      a_q   <= '0;
      b_q   <= '0;
      cin_q <= 1'b0;
    end else if (op_load) begin
      a_q   <= a;
      b_q   <= b;
      cin_q <= cin;
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      sum  <= '0;
      cout <= 1'b0;
    end else if (res_load) begin
      sum  <= res_exact ? sum_exact : sum_fast;
      cout <= cout_c;
    end
  end

  // ----------------------------------------------------------------- datapath
  // cpol[j]: carry into stage j, in the polarity that stage expects.
  logic [Q:0] cpol;

  rca_block #(.M(STAGE_M[0])) u_stage0 (
    .a    (a_q[STAGE_M[0]-1:0]),
    .b    (b_q[STAGE_M[0]-1:0]),
    .ci   (cin_q),
    .s    (sum_fast[STAGE_M[0]-1:0]),
    .co   (cpol[1]),
    .p_all()
  );
  assign sum_exact[STAGE_M[0]-1:0] = sum_fast[STAGE_M[0]-1:0];
  assign cpol[0] = cin_q;

  for (genvar j = 1; j < Q; j++) begin : g_stage
    localparam int unsigned LO  = stage_lo(j);
    localparam int unsigned MJ  = STAGE_M[j];
    localparam bit          INV = ((j - 1) % 2) == 1;
    if (j == NUC) begin : g_nucleus
      hc_nucleus_stage #(.M(MJ), .DROP(DROP), .INV_IN(INV)) u_nuc (
        .a       (a_q[LO +: MJ]),
        .b       (b_q[LO +: MJ]),
        .ci_pol  (cpol[j]),
        .s_spec  (sum_fast[LO +: MJ]),
        .s_exact (sum_exact[LO +: MJ]),
        .co_pol  (cpol[j+1]),
        .p_all   (p_nuc),
        .spec_err(spec_err)
      );
    end else begin : g_ci
      ci_cska_stage #(.M(MJ), .INV_IN(INV)) u_ci (
        .a     (a_q[LO +: MJ]),
        .b     (b_q[LO +: MJ]),
        .ci_pol(cpol[j]),
        .s     (sum_fast[LO +: MJ]),
        .co_pol(cpol[j+1]),
        .p_all ()
      );
      assign sum_exact[LO +: MJ] = sum_fast[LO +: MJ];
    end
  end

  // The last stage's skip gate inverts when its input is in true polarity.
  localparam bit LAST_INV_IN = ((Q - 2) % 2) == 1;
  assign cout_c = LAST_INV_IN ? cpol[Q] : ~cpol[Q];

  assign slow = p_nuc | spec_err;

  // --------------------------------------------------------------- controller
  vl_controller u_ctrl (
    .clk      (clk),
    .rst_n    (rst_n),
    .in_valid (in_valid),
    .in_ready (in_ready),
    .slow     (slow),
    .op_load  (op_load),
    .res_load (res_load),
    .res_exact(res_exact),
    .out_valid(out_valid),
    .out_slow (out_slow)
  );
endmodule
