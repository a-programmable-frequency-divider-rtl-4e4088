// Extended-range modular divider: a chain of 2/3 cells with range 2^VMIN .. 2^(NSTAGES+1)-1.
//
// Cell c (c = 0 is clocked by fin) divides by 2 or 3 under control of p[c]; its
// output fo clocks cell c+1 and cell c+1's mod_out is cell c's mod_in.  With every
// cell active the division ratio is p[0] + 2 p[1] + ... + 2^(NSTAGES-1) p[NSTAGES-1]
// + 2^NSTAGES.  To extend the range downwards, the mod_in of cell c
// (VMIN-1 <= c <= NSTAGES-2) is OR-ed with NOT(p[c+2] | ... | p[NSTAGES]): when no
// control bit above c+1 is set, cell c acts as the last cell of a shorter chain and
// the cells above it no longer affect the ratio.  The last cell's mod_in is tied
// high.  The resulting ratio is the binary value of p when p >= 2^(VMIN+1), and
// 2^VMIN + p[VMIN-1:0] otherwise (p[VMIN] has no effect there; writing it as 1
// makes the ratio equal to p for every p in range).
//
// Output: fout_origin is mod[1], the modulus output of the second cell.  It is
// periodic at fin / ratio for every ratio in range, high for one output cycle of
// cell 0 (2 or 3 fin cycles) per period; all edges are aligned to rising fin edges.
// The whole mod vector is brought out so that the enclosing divider can pick the
// modulus output of the last active cell.  The control word p must change only
// between division cycles (the enclosing divider loads it on the falling edge of
// fout_origin).
//
// The chain, the OR/INV range extension and taking the output from the second
// cell follow the divider described; the generic placement of the OR gates for
// any NSTAGES/VMIN is this design's formulation of the example given for
// min = n-2.
module vaucher_div #(
  parameter int unsigned NSTAGES = pdiv_pkg::NSTAGES,
  parameter int unsigned VMIN    = pdiv_pkg::VMIN
) (
  input  logic               fin,          // input clock
  input  logic               rst,          // asynchronous reset, active high
  input  logic [NSTAGES:0]   p,            // ratio control P0..P[NSTAGES]
  output logic [NSTAGES-1:0] mod,          // mod_out of every cell
  output logic               fout_origin   // divider output (mod_out of cell 1)
);
  logic [NSTAGES:0]   ck;          // ck[c] clocks cell c, ck[c+1] = fo of cell c
  logic [NSTAGES-1:0] mod_in;
  logic [NSTAGES+1:0] any_above;   // any_above[j] = |p[NSTAGES:j]

  assign ck[0] = fin;

  always_comb begin
    any_above[NSTAGES+1] = 1'b0;
    for (int j = NSTAGES; j >= 0; j--) any_above[j] = any_above[j+1] | p[j];
  end

  always_comb begin
    for (int c = 0; c < NSTAGES; c++) begin
      if (c == NSTAGES - 1)      mod_in[c] = 1'b1;
      else if (c >= VMIN - 1)    mod_in[c] = mod[c+1] | ~any_above[c+2];
      else                       mod_in[c] = mod[c+1];
    end
  end

  for (genvar c = 0; c < NSTAGES; c++) begin : g_cell
    cell23 u_cell (
      .ck     (ck[c]),
      .rst    (rst),
      .p      (p[c]),
      .mod_in (mod_in[c]),
      .fo     (ck[c+1]),
      .mod_out(mod[c])
    );
  end

  assign fout_origin = mod[1];

  initial begin
    assert (NSTAGES >= 2 && VMIN >= 2 && VMIN <= NSTAGES)
      else $error("vaucher_div: need NSTAGES >= 2 and 2 <= VMIN <= NSTAGES");
  end
endmodule
