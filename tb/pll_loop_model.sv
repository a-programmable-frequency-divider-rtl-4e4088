// Behavioural model of the analog part of the fractional PLL: charge pump, loop
// filter and VCO.  Not synthesizable; for testbenches only.
//
// The charge pump and second-order loop filter are reduced to a discrete
// proportional-plus-integral update of the VCO period, applied once per
// reference cycle: the net time e (in time units) for which up was high minus the
// time dn was high during the last comparison moves the period by
//     period -= KP * e + integ,   integ += KI * e.
// The VCO toggles its output every half period.  Edge times are rounded to whole
// time units, and the rounding remainder is carried to the next edge, so the
// average frequency is exact.  T0 is the free-running period.
// The real loop is a current-source charge pump into a second-order active
// filter driving an LC VCO; this discrete update, its gains and the 1 ps time
// step are the testbench's own simplification, chosen only to make the loop
// settle within about a thousand reference cycles.
module pll_loop_model #(
  parameter real T0 = 400.0,
  parameter real KP = 1.0e-3,
  parameter real KI = 1.0e-4
) (
  input  logic ref_clk,
  input  logic up,
  input  logic dn,
  output logic vco,
  output real  period
);
  real    integ = 0.0, e_acc = 0.0, rem = 0.0;
  longint t_up = 0, t_dn = 0;

  initial begin
    period = T0;
    vco = 1'b0;
  end

  always @(posedge up) t_up = $time;
  always @(negedge up) e_acc += real'($time - t_up);
  always @(posedge dn) t_dn = $time;
  always @(negedge dn) e_acc -= real'($time - t_dn);

  always @(posedge ref_clk) begin
    integ  += KI * e_acc;
    period  = T0 - KP * e_acc - integ;
    e_acc   = 0.0;
  end

  initial begin
    forever begin
      real    half;
      longint d;
      half = period / 2.0 + rem;
      d    = longint'($floor(half));
      rem  = half - real'(d);
      #(d) vco = ~vco;
    end
  end
endmodule
