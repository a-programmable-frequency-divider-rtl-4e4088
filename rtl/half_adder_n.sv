// N-bit half adder: adds a single carry-in bit to an N-bit word.
//
// A ripple chain of N one-bit half adders.  Stage 0 adds cin to a[0]; stage i adds
// the carry of stage i-1 to a[i] (sum = a XOR b, carry = a AND b).  The carry of the
// last stage is cout, so {cout, s} = a + cin.  Purely combinational.
// The structure is the one described for the duty-cycle correction loop.
module half_adder_n #(
  parameter int unsigned N = pdiv_pkg::NSTAGES
) (
  input  logic [N-1:0] a,
  input  logic         cin,
  output logic [N-1:0] s,
  output logic         cout
);
  logic [N:0] c;
  assign c[0] = cin;
  for (genvar i = 0; i < N; i++) begin : g_ha
    assign s[i]   = a[i] ^ c[i];
    assign c[i+1] = a[i] & c[i];
  end
  assign cout = c[N];
endmodule
