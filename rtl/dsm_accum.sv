// First-order delta-sigma modulator for the fractional divider: a FBITS-bit accumulator.
//
// On every rising clk edge acc <= acc + frac (modulo 2^FBITS) and carry <= the
// carry out of that addition.  Over 2^FBITS clock cycles carry is 1 exactly frac
// times, so its average is frac / 2^FBITS; the quantisation error is first-order
// noise shaped.  frac = {Sf1, Sf2}: Sf1 weighs 1/2 and Sf2 weighs 1/4 with the
// default FBITS = 2.  Asynchronous active-high reset of acc and carry to 0 (this
// design's choice).
module dsm_accum #(
  parameter int unsigned FBITS = pdiv_pkg::FRAC_BITS
) (
  input  logic             clk,
  input  logic             rst,
  input  logic [FBITS-1:0] frac,
  output logic             carry,
  output logic [FBITS-1:0] acc
);
  always_ff @(posedge clk or posedge rst) begin
    if (rst) {carry, acc} <= '0;
    else     {carry, acc} <= {1'b0, acc} + {1'b0, frac};
  end
endmodule
