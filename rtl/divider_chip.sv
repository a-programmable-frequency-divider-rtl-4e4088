// Test chip: three copies of the programmable divider and the fractional PLL divider.
//
// The chip carries three identical programmable dividers (prog_divider), each with
// its own input clock and ratio word: one fed from a high-frequency signal
// generator through on-chip buffers, one from an on-chip ring oscillator and one
// from a low-frequency generator through inverters.  Those buffers and the ring
// oscillator are analog and sit outside this RTL: their (digital) outputs are the
// fin_* ports.  Next to them sits the divider of the fractional PLL
// (frac_divider) and the PLL's phase/frequency detector (pfd), which compares the
// divided clock with the reference pll_ref.  The charge pump, loop filter and LC
// VCO are analog: the VCO clock comes in on vco_clk, the detector's up/dn
// outputs go out to the charge pump, and the divided clock is also brought out
// on pll_fdiv.
// All ports are plain signals; reset is asynchronous and active high.
module divider_chip #(
  parameter int unsigned NSTAGES = pdiv_pkg::NSTAGES,
  parameter int unsigned VMIN    = pdiv_pkg::VMIN,
  parameter int unsigned FBITS   = pdiv_pkg::FRAC_BITS
) (
  input  logic             rst,
  // copy 1: GHz input through the high-frequency buffers
  input  logic             fin_hf,
  input  logic [NSTAGES:0] ratio_hf,
  output logic             fout_hf,
  // copy 2: input from the on-chip ring oscillator
  input  logic             fin_ring,
  input  logic [NSTAGES:0] ratio_ring,
  output logic             fout_ring,
  // copy 3: MHz .. kHz input through inverters
  input  logic             fin_lf,
  input  logic [NSTAGES:0] ratio_lf,
  output logic             fout_lf,
  // fractional PLL divider
  input  logic             vco_clk,
  input  logic [NSTAGES:0] pll_int,
  input  logic [FBITS-1:0] pll_frac,
  output logic             pll_fdiv,
  input  logic             pll_ref,    // PLL reference clock
  output logic             pll_up,     // phase detector outputs to the charge pump
  output logic             pll_dn
);
  logic             unused_hf_origin, unused_ring_origin, unused_lf_origin;
  logic             unused_hf_sol2, unused_ring_sol2, unused_lf_sol2;
  logic [NSTAGES:0] unused_hf_p, unused_ring_p, unused_lf_p, unused_pll_p;

  prog_divider #(.NSTAGES(NSTAGES), .VMIN(VMIN)) u_div_hf (
    .fin(fin_hf), .rst(rst), .s(ratio_hf), .fout(fout_hf),
    .fout_origin(unused_hf_origin), .sol2_active(unused_hf_sol2), .p_q(unused_hf_p)
  );

  prog_divider #(.NSTAGES(NSTAGES), .VMIN(VMIN)) u_div_ring (
    .fin(fin_ring), .rst(rst), .s(ratio_ring), .fout(fout_ring),
    .fout_origin(unused_ring_origin), .sol2_active(unused_ring_sol2), .p_q(unused_ring_p)
  );

  prog_divider #(.NSTAGES(NSTAGES), .VMIN(VMIN)) u_div_lf (
    .fin(fin_lf), .rst(rst), .s(ratio_lf), .fout(fout_lf),
    .fout_origin(unused_lf_origin), .sol2_active(unused_lf_sol2), .p_q(unused_lf_p)
  );

  frac_divider #(.NSTAGES(NSTAGES), .VMIN(VMIN), .FBITS(FBITS)) u_pll_div (
    .fin(vco_clk), .rst(rst), .s(pll_int), .frac(pll_frac),
    .fout(pll_fdiv), .p(unused_pll_p)
  );

  pfd u_pll_pfd (
    .ref_clk(pll_ref), .div_clk(pll_fdiv), .rst(rst), .up(pll_up), .dn(pll_dn)
  );
endmodule
