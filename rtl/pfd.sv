// Phase/frequency detector of the fractional PLL (digital part of "PFD & charge pump").
//
// Classic three-state detector: a rising edge of ref sets up, a rising edge of div
// sets dn, and as soon as both are set they are cleared together.  While ref leads
// div, up is high for the lead time (dn only pulses for the reset delay); while div
// leads, dn is high for the lead time.  up and dn switch the charge-pump current
// sources.  The state (up, dn) = (1, 1) only lasts until the clear takes effect;
// in zero-delay simulation it does not last at all.
//
// The detector is only named, together with the charge pump, in the PLL
// description (which compares the reference phase with the divided VCO phase and
// drives the charge-pump switches UP and DOWN); this three-state form with two
// flip-flops and an AND-gate clear is this design's choice.  rst is asynchronous
// and active high.  The clear path from the two flip-flop outputs back to their
// own asynchronous resets is intended: it is what returns the detector to the
// idle state, and timing tools report it as a loop through the reset pins.
module pfd (
  input  logic ref_clk,  // reference clock
  input  logic div_clk,  // divided VCO clock
  input  logic rst,      // asynchronous reset, active high
  output logic up,       // ref leads: speed the VCO up
  output logic dn        // div leads: slow the VCO down
);
  logic clr;

  assign clr = rst | (up & dn);

  always_ff @(posedge ref_clk or posedge clr) begin
    if (clr) up <= 1'b0;
    else     up <= 1'b1;
  end

  always_ff @(posedge div_clk or posedge clr) begin
    if (clr) dn <= 1'b0;
    else     dn <= 1'b1;
  end
endmodule
