// hc_prefix: speculative Han-Carlson parallel prefix network.
//
// Inputs are the bit generate/propagate pairs (g[i], p[i]) of an M-bit group,
// M a power of two. The network has 1 + log2(M) rows of prefix (black) cells:
//   row 1            Brent-Kung row: every odd bit i combines with bit i-1;
//   rows 2..log2(M)  Kogge-Stone rows on the odd bits only, distance 2, 4, ...
//                    (bits that already reach bit 0 are passed on unchanged);
//   last row         Brent-Kung row: every even bit i > 0 combines with the
//                    finished odd bit i-1.
// The speculative result is taken with the last DROP Kogge-Stone rows removed.
// Odd bits then span only 2^(log2(M)-DROP) bits, so the group signals of bits
// above that span are truncated: g_spec treats everything below the span as
// generating no carry, and p_spec is forced to 0 there so that a carry input
// of the group cannot leak through a truncated span. spec_err is 1 when any
// truncated span is fully propagating, the only case in which a truncated
// carry can be wrong (a conservative test). g_exact/p_exact come from the full
// network (the removed rows plus the last row), i.e. G[i:0] and P[i:0].
//
// Removing Kogge-Stone rows to form a speculative stage follows the source
// description; the number of removed rows and the error test are this
// design's choices. Purely combinational.
module hc_prefix #(
  parameter int unsigned M    = 16,
  parameter int unsigned DROP = 1
) (
  input  logic [M-1:0] g,
  input  logic [M-1:0] p,
  output logic [M-1:0] g_spec,
  output logic [M-1:0] p_spec,
  output logic         spec_err,
  output logic [M-1:0] g_exact,
  output logic [M-1:0] p_exact
);
  localparam int unsigned LOGM = cska_pkg::log2_floor(M);
  localparam int unsigned K    = LOGM - 1;      // Kogge-Stone rows
  localparam int unsigned RS   = K + 1 - DROP;  // last row used by the speculative result
  localparam int unsigned SPAN = 1 << RS;       // bits reaching bit 0 after row RS

  if ((1 << LOGM) != M || M < 4) begin : g_bad_m
    $error("hc_prefix: M must be a power of two of at least 4");
  end
  if (DROP > K) begin : g_bad_drop
    $error("hc_prefix: DROP must not exceed the number of Kogge-Stone rows");
  end

  // gr[r] / pr[r]: group signals after row r (row 0 = inputs).
  logic [M-1:0] gr [K+2];
  logic [M-1:0] pr [K+2];

  assign gr[0] = g;
  assign pr[0] = p;

  // Row 1: Brent-Kung row on the odd bits.
  for (genvar i = 0; i < M; i++) begin : g_row1
    if (i % 2 == 1) begin : g_cell
      assign gr[1][i] = g[i] | (p[i] & g[i-1]);
      assign pr[1][i] = p[i] & p[i-1];
    end else begin : g_pass
      assign gr[1][i] = g[i];
      assign pr[1][i] = p[i];
    end
  end

  // Rows 2..K+1: Kogge-Stone rows on the odd bits, distance 2^(r-1).
  for (genvar r = 2; r <= K + 1; r++) begin : g_ks
    localparam int unsigned D = 1 << (r - 1);
    for (genvar i = 0; i < M; i++) begin : g_bit
      if (i % 2 == 1 && i >= D + 1) begin : g_cell
        assign gr[r][i] = gr[r-1][i] | (pr[r-1][i] & gr[r-1][i-D]);
        assign pr[r][i] = pr[r-1][i] & pr[r-1][i-D];
      end else begin : g_pass
        assign gr[r][i] = gr[r-1][i];
        assign pr[r][i] = pr[r-1][i];
      end
    end
  end

  // Last row (Brent-Kung) for the speculative and the exact result.
  logic [M-1:0] gs_full, ps_full;
  for (genvar i = 0; i < M; i++) begin : g_last
    if (i % 2 == 0 && i > 0) begin : g_cell
      assign gs_full[i] = gr[RS][i]  | (pr[RS][i]  & gr[RS][i-1]);
      assign ps_full[i] = pr[RS][i]  & pr[RS][i-1];
      assign g_exact[i] = gr[K+1][i] | (pr[K+1][i] & gr[K+1][i-1]);
      assign p_exact[i] = pr[K+1][i] & pr[K+1][i-1];
    end else begin : g_pass
      assign gs_full[i] = gr[RS][i];
      assign ps_full[i] = pr[RS][i];
      assign g_exact[i] = gr[K+1][i];
      assign p_exact[i] = pr[K+1][i];
    end
  end

  // Bits 0..SPAN reach bit 0 in the speculative network; the rest are truncated.
  logic [M-1:0] complete;
  for (genvar i = 0; i < M; i++) begin : g_complete
    assign complete[i] = (i <= SPAN);
  end

  assign g_spec   = gs_full;
  assign p_spec   = ps_full & complete;
  assign spec_err = |(ps_full & ~complete);
endmodule
