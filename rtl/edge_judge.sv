// On-edge judgment: one-hot marker of the leading 1 of the control word.
//
// on_edge[i] = p[i] AND NOT(p[i+1] | ... | p[N]).  Exactly one bit is set for any
// non-zero p.  Purely combinational (a suffix-OR chain, inverters and AND gates,
// as in the scheme described).  on_edge[N] equals p[N], since nothing lies above
// the top bit.
module edge_judge #(
  parameter int unsigned N = pdiv_pkg::NSTAGES
) (
  input  logic [N:0] p,
  output logic [N:0] on_edge
);
  logic [N+1:0] or_high;   // or_high[i] = |p[N:i]

  always_comb begin
    or_high[N+1] = 1'b0;
    for (int i = N; i >= 0; i--) or_high[i] = or_high[i+1] | p[i];
    for (int i = 0; i <= N; i++) on_edge[i] = p[i] & ~or_high[i+1];
  end
endmodule
