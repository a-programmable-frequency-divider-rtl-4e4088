// Testbench helper: measures a divided clock in cycles of its input clock.
//
// Counts falling edges of clk and, at every rising edge of sig (sampled on those
// falling edges), records the length of the period that just ended and how long
// sig was high in it.  rises counts the rising edges seen so far.
module period_mon (
  input  logic clk,
  input  logic sig,
  output int   period,
  output int   high,
  output int   rises
);
  int   cnt = 0, last_rise = 0, last_fall = 0;
  logic prev = 1'b0;

  initial begin period = 0; high = 0; rises = 0; end

  always @(negedge clk) begin
    cnt++;
    if (sig && !prev) begin
      period    = cnt - last_rise;
      high      = last_fall - last_rise;
      last_rise = cnt;
      rises++;
    end
    if (!sig && prev) last_fall = cnt;
    prev = sig;
  end
endmodule
