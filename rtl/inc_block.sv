// inc_block: incrementation block of a concatenation/incrementation stage.
//
// The stage's RCA block adds its operand slices with carry input 0; this
// block then adds the real stage carry input, which arrives later from the
// previous stage's skip logic: s_out = s_in + ci (modulo 2^M). It is a chain
// of half adders: bit i toggles when ci is 1 and all lower bits of s_in are 1.
// Its own carry out is not needed, because the stage carry output is produced
// by the skip logic (G | P & ci). Purely combinational.
module inc_block #(
  parameter int unsigned M = 4
) (
  input  logic [M-1:0] s_in,
  input  logic         ci,
  output logic [M-1:0] s_out
);
  logic [M-1:0] t;   // t[i]: ci AND all of s_in[i-1:0]

  assign t[0] = ci;
  for (genvar i = 0; i < M; i++) begin : g_ha
    assign s_out[i] = s_in[i] ^ t[i];
    if (i < M - 1) begin : g_chain
      assign t[i+1] = s_in[i] & t[i];
    end
  end
endmodule
