// Division-ratio judgment: flags control words of the form 2^r - 1 (0..011..1).
//
// For each index i (1 <= i <= N) it forms
//     div_2r_1[i] = NOT(s[i+1] | ... | s[N]) AND (s[0] & s[1] & ... & s[i])
// i.e. s[i] is the leading one and every bit below it is 1.  select_sol2 is the OR
// of all div_2r_1[i].  Prefix AND and suffix OR chains are shared between indices,
// as in the gate-level scheme described.  Purely combinational.
// Index i = N (the all-ones word, ratio 2^(N+1)-1) is included as well, which is
// this design's reading: that ratio is also one where the plain duty-cycle
// correction would switch the chain length.  div_2r_1[0] is always 0: s = 1 is
// outside the divider's range; the bit exists only so that div_2r_1 is indexed by i.
module ratio_judge #(
  parameter int unsigned N = pdiv_pkg::NSTAGES
) (
  input  logic [N:0] s,            // division ratio control S0..S[N]
  output logic [N:0] div_2r_1,     // div_2r_1[i]: s == 2^(i+1) - 1
  output logic       select_sol2   // s is of the form 2^r - 1, r >= 2
);
  logic [N:0]   and_low;   // and_low[i]  = &s[i:0]
  logic [N+1:0] or_high;   // or_high[i]  = |s[N:i]

  assign and_low[0]  = s[0];
  assign or_high[N+1] = 1'b0;
  assign div_2r_1[0] = 1'b0;
  for (genvar i = 1; i <= N; i++) begin : g_and
    assign and_low[i] = and_low[i-1] & s[i];
  end
  for (genvar i = 0; i <= N; i++) begin : g_or
    assign or_high[i] = or_high[i+1] | s[i];
  end
  for (genvar i = 1; i <= N; i++) begin : g_flag
    assign div_2r_1[i] = ~or_high[i+1] & and_low[i];
  end

  assign select_sol2 = |div_2r_1;
endmodule
