// hc_nucleus_stage: the parallel-prefix nucleus stage of the hybrid carry
// skip adder.
//
// Pre-processing forms g[i] = a[i] & b[i] and p[i] = a[i] ^ b[i]. A
// speculative Han-Carlson network (hc_prefix) forms the group signals
// G[i:0], P[i:0]. The longest carry G[M-1:0] and the product of all
// propagates P[M-1:0] feed the skip logic, which produces the stage carry
// output from the incoming carry CO(p-1) in parallel with the rest of the
// stage. P[M-1:0] is also brought out as p_all: it is the predictor of the
// variable latency adder (1 means the carry skips this stage and the long
// paths through the adder may be active). The intermediate carries are
// c[i+1] = G[i:0] | P[i:0] & CO(p-1), and post-processing gives the sums
// s[i] = p[i] ^ c[i]. Two sum sets are produced: s_spec from the speculative
// carries (valid when spec_err is 0) and s_exact from the full network.
// Carry polarity at ci_pol/co_pol follows skip_logic (INV_IN). Purely
// combinational.
module hc_nucleus_stage #(
  parameter int unsigned M      = 16,
  parameter int unsigned DROP   = 1,
  parameter bit          INV_IN = 1'b0
) (
  input  logic [M-1:0] a,
  input  logic [M-1:0] b,
  input  logic         ci_pol,
  output logic [M-1:0] s_spec,
  output logic [M-1:0] s_exact,
  output logic         co_pol,
  output logic         p_all,
  output logic         spec_err
);
  logic [M-1:0] g, p;
  logic [M-1:0] g_spec, p_spec, g_exact, p_exact;
  logic         ci;
  logic [M-1:0] c_spec, c_exact;

  assign g  = a & b;
  assign p  = a ^ b;
  assign ci = INV_IN ? ~ci_pol : ci_pol;

  hc_prefix #(.M(M), .DROP(DROP)) u_prefix (
    .g       (g),
    .p       (p),
    .g_spec  (g_spec),
    .p_spec  (p_spec),
    .spec_err(spec_err),
    .g_exact (g_exact),
    .p_exact (p_exact)
  );

  assign c_spec[0]  = ci;
  assign c_exact[0] = ci;
  for (genvar i = 0; i < M - 1; i++) begin : g_carry
    assign c_spec[i+1]  = g_spec[i]  | (p_spec[i]  & ci);
    assign c_exact[i+1] = g_exact[i] | (p_exact[i] & ci);
  end

  assign s_spec  = p ^ c_spec;
  assign s_exact = p ^ c_exact;
  assign p_all   = p_exact[M-1];

  skip_logic #(.INV_IN(INV_IN)) u_skip (
    .g     (g_exact[M-1]),
    .p     (p_exact[M-1]),
    .ci_pol(ci_pol),
    .co_pol(co_pol)
  );
endmodule
