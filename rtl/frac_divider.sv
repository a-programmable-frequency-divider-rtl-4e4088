// Fractional programmable divider of the PLL: ratio S + frac / 2^FBITS.
//
// The extended-range 2/3-cell chain (vaucher_div) divides the VCO clock by S + c,
// where S = S0 + 2 S1 + ... + 2^NSTAGES S[NSTAGES] is the integer part and c is the
// carry of a first-order delta-sigma accumulator (dsm_accum) that adds the fraction
// {Sf1, Sf2} once per output cycle.  An (NSTAGES+1)-bit half adder forms S + c.
// The average ratio is S + Sf1/2 + Sf2/4 (with FBITS = 2): for example S = 240 and
// frac = 1 divide by 241, 240, 240, 240 in turn, 240.25 on average.
// The output is the narrow-pulse chain output (the PLL's phase detector uses one
// edge only), aligned to rising edges of fin.
//
// Timing: the accumulator is clocked by the falling edge of the chain output, so
// the chain control word changes only between division cycles (same reasoning as
// in prog_divider).  S must not be 2^r - 1 when frac is non-zero: S + 1 would then
// move the leading 1 and change the number of active cells from one cycle to
// the next, and the first cycle after such a change is not controlled (the same
// effect that rules out the plain duty-cycle correction for 2^r - 1 ratios).
// That edge choice, the reset and the use of the same chain
// size as the integer divider are this design's own choices.  S + frac must not
// exceed 2^(NSTAGES+1) - 1, and S >= 2^(VMIN+1).
module frac_divider #(
  parameter int unsigned NSTAGES = pdiv_pkg::NSTAGES,
  parameter int unsigned VMIN    = pdiv_pkg::VMIN,
  parameter int unsigned FBITS   = pdiv_pkg::FRAC_BITS
) (
  input  logic             fin,     // VCO clock
  input  logic             rst,     // asynchronous reset, active high
  input  logic [NSTAGES:0] s,       // integer part of the ratio
  input  logic [FBITS-1:0] frac,    // fractional part, in units of 2^-FBITS
  output logic             fout,    // divided clock to the phase detector
  output logic [NSTAGES:0] p        // control word currently applied to the chain
);
  logic               carry;
  logic [FBITS-1:0]   acc;
  logic               cout;
  logic [NSTAGES:0]   sum;
  logic [NSTAGES-1:0] mod;
  logic               fout_n;

  assign fout_n = ~fout;

  dsm_accum #(.FBITS(FBITS)) u_dsm (
    .clk  (fout_n),
    .rst  (rst),
    .frac (frac),
    .carry(carry),
    .acc  (acc)
  );

  half_adder_n #(.N(NSTAGES + 1)) u_adder (
    .a   (s),
    .cin (carry),
    .s   (sum),
    .cout(cout)
  );

  assign p = sum;

  vaucher_div #(.NSTAGES(NSTAGES), .VMIN(VMIN)) u_chain (
    .fin        (fin),
    .rst        (rst),
    .p          (p),
    .mod        (mod),
    .fout_origin(fout)
  );

  always_ff @(posedge fout) begin
    assert (!cout) else $error("frac_divider: S + carry overflows the chain");
  end
endmodule
