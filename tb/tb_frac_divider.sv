// Self-checking testbench of the fractional PLL divider at its default size.
//
// Runs the ratios the fractional PLL was measured with (240, 240.25, 240.5,
// 176.25) and a set of others, including a fraction of 3/4 and a word near the
// top of the range.  After settling it checks 8 consecutive output periods: each
// must be S or S+1 input cycles, and every group of 4 consecutive periods must
// add up to 4*S + frac (average ratio S + frac/4).  It also counts how often the
// delta-sigma carry actually lengthened a period.
module tb_frac_divider;
  localparam int unsigned NST = 8;

  logic         fin = 1'b0, rst = 1'b1;
  logic [NST:0] s = 9'd240;
  logic [1:0]   frac = '0;
  logic         fout;
  logic [NST:0] p;
  int           period, high, rises;
  int           checks = 0, failures = 0, stretched = 0;

  frac_divider #(.NSTAGES(NST)) dut (.fin(fin), .rst(rst), .s(s), .frac(frac), .fout(fout), .p(p));
  period_mon mon (.clk(fin), .sig(fout), .period(period), .high(high), .rises(rises));

  always #5 fin = ~fin;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; if (failures < 20) $display("FAIL: %s", what); end
  endtask

  task automatic run(input int unsigned si, input int unsigned fi);
    int per[8];
    int r;
    s = (NST+1)'(si);
    frac = 2'(fi);
    r = rises;
    wait (rises >= r + 4);
    for (int k = 0; k < 8; k++) begin
      r = rises;
      wait (rises == r + 1);
      per[k] = period;
      check(period == int'(si) || (fi != 0 && period == int'(si) + 1),
            $sformatf("S=%0d frac=%0d period %0d", si, fi, period));
      if (period == int'(si) + 1) stretched++;
    end
    for (int k = 0; k + 3 < 8; k++)
      check(per[k] + per[k+1] + per[k+2] + per[k+3] == 4 * int'(si) + int'(fi),
            $sformatf("S=%0d frac=%0d four periods %0d", si, fi, per[k] + per[k+1] + per[k+2] + per[k+3]));
  endtask

  initial begin
    repeat (3) @(negedge fin);
    rst = 1'b0;
    run(240, 0);
    run(240, 1);
    run(240, 2);
    run(176, 1);
    run(240, 3);
    run(8, 1);
    run(14, 2);
    run(254, 3);
    run(256, 1);
    run(509, 2);
    check(stretched > 0, "delta-sigma carry never lengthened a period");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin : watchdog
    #(10 * 200_000);
    failures++;
    $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
