// skip_logic: carry skip logic of one stage, written as a single compound
// gate instead of a multiplexer.
//
// Function: carry_out = g | (p & carry_in), where g is the stage's own carry
// (RCA carry out with carry-in 0, or the prefix group generate) and p is the
// product of the stage propagates. Since a compound gate inverts, stages
// alternate the polarity of the carry they pass on:
//   INV_IN = 0: carry in true, AOI21 gate, carry out inverted
//               co_pol = ~(g | (p & ci_pol))
//   INV_IN = 1: carry in inverted, OAI21 gate on the complemented g and p,
//               carry out true
//               co_pol = ~((~p | ci_pol) & ~g)
// Purely combinational.
module skip_logic #(
  parameter bit INV_IN = 1'b0
) (
  input  logic g,
  input  logic p,
  input  logic ci_pol,
  output logic co_pol
);
  if (!INV_IN) begin : g_aoi
    assign co_pol = ~(g | (p & ci_pol));
  end else begin : g_oai
    logic g_n, p_n;
    assign g_n    = ~g;
    assign p_n    = ~p;
    assign co_pol = ~((p_n | ci_pol) & g_n);
  end
endmodule
