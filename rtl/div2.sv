// Divide-by-2: a toggle flip-flop on the rising edge of clk.
//
// q toggles on every rising edge of clk, so q has exactly twice the period of clk
// and stays high for one full clk period and low for the next, whatever clk's own
// duty cycle.  Asynchronous, active-high reset to 0 (this design's choice).
module div2 (
  input  logic clk,
  input  logic rst,
  output logic q
);
  always_ff @(posedge clk or posedge rst) begin
    if (rst) q <= 1'b0;
    else     q <= ~q;
  end
endmodule
