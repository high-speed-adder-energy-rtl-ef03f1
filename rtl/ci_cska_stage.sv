// ci_cska_stage: one concatenation/incrementation carry skip adder stage.
//
// The RCA block adds the M-bit operand slices with its carry input tied to 0
// (concatenation), so it does not wait for the carry of lower stages. Its
// carry out is the stage generate G and its propagate product is P. When the
// stage carry input arrives, two things happen in parallel: the skip logic
// forms the stage carry output G | P & ci, and the incrementation block adds
// ci to the RCA sum. The carry input and output use the polarity convention
// of skip_logic (INV_IN selects AOI or OAI). Purely combinational.
module ci_cska_stage #(
  parameter int unsigned M      = 4,
  parameter bit          INV_IN = 1'b0
) (
  input  logic [M-1:0] a,
  input  logic [M-1:0] b,
  input  logic         ci_pol,
  output logic [M-1:0] s,
  output logic         co_pol,
  output logic         p_all
);
  logic [M-1:0] s_rca;
  logic         g_blk;
  logic         ci_true;

  rca_block #(.M(M)) u_rca (
    .a    (a),
    .b    (b),
    .ci   (1'b0),
    .s    (s_rca),
    .co   (g_blk),
    .p_all(p_all)
  );

  assign ci_true = INV_IN ? ~ci_pol : ci_pol;

  inc_block #(.M(M)) u_inc (
    .s_in (s_rca),
    .ci   (ci_true),
    .s_out(s)
  );

  skip_logic #(.INV_IN(INV_IN)) u_skip (
    .g     (g_blk),
    .p     (p_all),
    .ci_pol(ci_pol),
    .co_pol(co_pol)
  );
endmodule
