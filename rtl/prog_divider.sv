// Programmable frequency divider, ratio 8 .. 2^(NSTAGES+1)-1, close-to-50% duty cycle.
//
// The ratio N = S0 + 2 S1 + ... + 2^NSTAGES S[NSTAGES] is given in plain binary.
// Two correction schemes share one extended-range 2/3-cell chain (vaucher_div):
//
// Solution 1 (every N not of the form 2^r - 1).  The chain divides by
//   m + cin, where m = S[NSTAGES:1] and cin = fout_div2 AND S0,
// and its narrow-pulse output fout_origin drives a divide-by-2 (div2) whose output
// is the divider output.  For even N (S0 = 0) the chain divides by m = N/2 and the
// output is exactly 50%.  For odd N = 2m+1 the chain alternates between m (output
// high) and m+1 (output low): period N, duty m/(2m+1).  The "+cin" is the
// NSTAGES-bit half adder.
//
// Solution 2 (N = 2^r - 1, detected by ratio_judge).  Solution 1 would make m+1 a
// power of two and change the number of active cells every cycle, so instead the
// chain gets S itself and divides by N.  Its last active cell (the one whose mod_in
// is forced high, just below the leading 1 found by edge_judge) has a modulus
// output that is high for k = (N-1)/2 input cycles of every N, and that signal is
// the divider output: duty k/(2k+1).
//
// An (NSTAGES+1)-bit multiplexer picks the chain control word (adder output or S),
// and an output multiplexer picks div2 or the on-edge modulus signal.
//
// Timing: all output edges are aligned to rising edges of fin.  The chain control
// word p_q is registered on the falling edge of fout_origin, which lies between the
// point where the fastest cell has taken its decision for the current division
// cycle and the point where the slowest active cell takes its decision for the
// next, so every division cycle sees a single consistent control word.  This
// register, the asynchronous active-high reset and the reset value p_q = 0 (chain
// ratio 4 until the first load) are this design's own choices; the document leaves
// the loop timing at gate level.  A new S takes effect within two output periods.
// S below 8 is outside the range.
module prog_divider #(
  parameter int unsigned NSTAGES = pdiv_pkg::NSTAGES,
  parameter int unsigned VMIN    = pdiv_pkg::VMIN
) (
  input  logic             fin,          // input clock
  input  logic             rst,          // asynchronous reset, active high
  input  logic [NSTAGES:0] s,            // division ratio N (binary)
  output logic             fout,         // divided clock, close-to-50% duty cycle
  output logic             fout_origin,  // narrow-pulse chain output, period fin/(chain ratio)
  output logic             sol2_active,  // 1: Solution 2 (N = 2^r - 1) in use
  output logic [NSTAGES:0] p_q           // control word currently loaded in the chain
);
  logic [NSTAGES-1:0] mod;
  logic [NSTAGES:0]   div_2r_1;
  logic               select_sol2;
  logic               fout_div2;
  logic               cin;
  logic [NSTAGES-1:0] sum;
  logic               cout;
  logic [NSTAGES:0]   p_next;
  logic [NSTAGES:0]   on_edge;
  logic               sol2_out;

  // Solution 1 feedback: carry-in from the divided output and the LSB
  assign cin = fout_div2 & s[0];

  half_adder_n #(.N(NSTAGES)) u_adder (
    .a   (s[NSTAGES:1]),
    .cin (cin),
    .s   (sum),
    .cout(cout)
  );

  ratio_judge #(.N(NSTAGES)) u_judge (
    .s          (s),
    .div_2r_1   (div_2r_1),
    .select_sol2(select_sol2)
  );

  // (NSTAGES+1)-bit multiplexer for the chain control word
  assign p_next = select_sol2 ? s : {cout, sum};

  always_ff @(negedge fout_origin or posedge rst) begin
    if (rst) begin
      p_q         <= '0;
      sol2_active <= 1'b0;
    end else begin
      p_q         <= p_next;
      sol2_active <= select_sol2;
    end
  end

  vaucher_div #(.NSTAGES(NSTAGES), .VMIN(VMIN)) u_chain (
    .fin        (fin),
    .rst        (rst),
    .p          (p_q),
    .mod        (mod),
    .fout_origin(fout_origin)
  );

  div2 u_div2 (
    .clk(fout_origin),
    .rst(rst),
    .q  (fout_div2)
  );

  // Solution 2 output: modulus signal of the cell just below the leading 1
  edge_judge #(.N(NSTAGES)) u_edge (
    .p      (p_q),
    .on_edge(on_edge)
  );

  always_comb begin
    sol2_out = 1'b0;
    for (int c = 0; c < NSTAGES; c++) sol2_out |= on_edge[c+1] & mod[c];
  end

  // output multiplexer
  assign fout = sol2_active ? sol2_out : fout_div2;
endmodule
