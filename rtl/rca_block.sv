// rca_block: the ripple-carry (RCA) block of one carry skip adder stage.
//
// M full adders are cascaded, the carry of bit i feeding bit i+1. Besides the
// sum and the carry out of the chain, the block forms p_all, the product of
// the M propagate signals a[i]^b[i]; the skip logic uses it to decide that the
// stage carry input passes straight through. In the concatenation stages the
// chain's carry input is tied to 0, so co is then the group generate of the
// stage. Purely combinational; the worst case delay is the full chain, which
// is exactly the case p_all = 1.
module rca_block #(
  parameter int unsigned M = 4
) (
  input  logic [M-1:0] a,
  input  logic [M-1:0] b,
  input  logic         ci,
  output logic [M-1:0] s,
  output logic         co,
  output logic         p_all
);
  logic [M:0] c;

  assign c[0] = ci;

  for (genvar i = 0; i < M; i++) begin : g_fa
    full_adder u_fa (
      .a (a[i]),
      .b (b[i]),
      .ci(c[i]),
      .s (s[i]),
      .co(c[i+1])
    );
  end

  assign co    = c[M];
  assign p_all = &(a ^ b);
endmodule
