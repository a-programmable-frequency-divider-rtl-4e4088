// End-to-end testbench of the test chip at its default parameters.
//
// The three divider copies run from three unrelated input clocks (periods 4, 6
// and 14 time units) and the PLL divider from a fourth.  In each of four phases
// every copy gets a new ratio, chosen so that over the run each copy sees an even
// ratio (Solution 1, exact 50%), an odd ratio (Solution 1, m/(2m+1)) and a 2^r - 1
// ratio (Solution 2), and the PLL divider sees integer and fractional ratios.
// After a change of ratio the testbench waits four output periods, then checks
// four periods of every copy (period N, high time floor(N/2)) and eight periods of
// the PLL divider (S or S+1 each, S + frac/4 on average).  It counts how often each
// mechanism occurred (even, odd, 2^r - 1, ratio switch on a running divider,
// delta-sigma carry) and fails if one never did.  A free-running reference of
// period 1300 drives the phase detector against the PLL divider output: the
// divider is slower at ratio 240 and faster at 176.25, so both up and dn pulses
// must occur, and up and dn must never both stay high.
module tb_divider_chip;
  logic       rst = 1'b1;
  logic       fin_hf = 1'b0, fin_ring = 1'b0, fin_lf = 1'b0, vco_clk = 1'b0;
  logic [8:0] ratio_hf = 9'd8, ratio_ring = 9'd8, ratio_lf = 9'd8, pll_int = 9'd240;
  logic [1:0] pll_frac = 2'd0;
  logic       fout_hf, fout_ring, fout_lf, pll_fdiv;
  logic       pll_ref = 1'b0, pll_up, pll_dn;
  int         n_up = 0, n_dn = 0;
  int         checks = 0, failures = 0;
  int         n_even = 0, n_odd = 0, n_sol2 = 0, n_switch = 0, n_carry = 0;

  divider_chip dut (
    .rst(rst),
    .fin_hf(fin_hf), .ratio_hf(ratio_hf), .fout_hf(fout_hf),
    .fin_ring(fin_ring), .ratio_ring(ratio_ring), .fout_ring(fout_ring),
    .fin_lf(fin_lf), .ratio_lf(ratio_lf), .fout_lf(fout_lf),
    .vco_clk(vco_clk), .pll_int(pll_int), .pll_frac(pll_frac), .pll_fdiv(pll_fdiv),
    .pll_ref(pll_ref), .pll_up(pll_up), .pll_dn(pll_dn)
  );

  int per[4], hi[4], ri[4];
  period_mon m0 (.clk(fin_hf),   .sig(fout_hf),   .period(per[0]), .high(hi[0]), .rises(ri[0]));
  period_mon m1 (.clk(fin_ring), .sig(fout_ring), .period(per[1]), .high(hi[1]), .rises(ri[1]));
  period_mon m2 (.clk(fin_lf),   .sig(fout_lf),   .period(per[2]), .high(hi[2]), .rises(ri[2]));
  period_mon m3 (.clk(vco_clk),  .sig(pll_fdiv),  .period(per[3]), .high(hi[3]), .rises(ri[3]));

  always #2 fin_hf   = ~fin_hf;
  always #3 fin_ring = ~fin_ring;
  always #7 fin_lf   = ~fin_lf;
  always #3 vco_clk  = ~vco_clk;
  always #650 pll_ref = ~pll_ref;

  // phase detector: count pulses of up and dn that last longer than zero time
  longint t_up, t_dn;
  always @(posedge pll_up) t_up = $time;
  always @(negedge pll_up) if ($time > t_up) n_up++;
  always @(posedge pll_dn) t_dn = $time;
  always @(negedge pll_dn) if ($time > t_dn) n_dn++;
  always @(negedge vco_clk) begin
    checks++;
    if (pll_up && pll_dn) begin failures++; $display("FAIL: up and dn both held high"); end
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; if (failures < 20) $display("FAIL: %s", what); end
  endtask

  function automatic bit is_2r_1(int n);
    return (n & (n + 1)) == 0;
  endfunction

  task automatic check_copy(input int idx, input int n);
    int r;
    r = ri[idx];
    wait (ri[idx] >= r + 4);
    for (int k = 0; k < 4; k++) begin
      r = ri[idx];
      wait (ri[idx] == r + 1);
      check(per[idx] == n, $sformatf("copy %0d N=%0d period %0d", idx, n, per[idx]));
      check(hi[idx] == n / 2, $sformatf("copy %0d N=%0d high %0d", idx, n, hi[idx]));
    end
    if (is_2r_1(n))       n_sol2++;
    else if (n % 2 == 0)  n_even++;
    else                  n_odd++;
  endtask

  task automatic check_pll(input int si, input int fi);
    int r, sum;
    r = ri[3];
    wait (ri[3] >= r + 4);
    sum = 0;
    for (int k = 0; k < 8; k++) begin
      r = ri[3];
      wait (ri[3] == r + 1);
      check(per[3] == si || (fi != 0 && per[3] == si + 1),
            $sformatf("PLL S=%0d frac=%0d period %0d", si, fi, per[3]));
      if (per[3] == si + 1) n_carry++;
      sum += per[3];
    end
    check(sum == 8 * si + 2 * fi, $sformatf("PLL S=%0d frac=%0d 8 periods %0d", si, fi, sum));
  endtask

  task automatic phase(input int a, input int b, input int c, input int si, input int fi);
    ratio_hf = 9'(a); ratio_ring = 9'(b); ratio_lf = 9'(c);
    pll_int = 9'(si); pll_frac = 2'(fi);
    n_switch++;
    fork
      check_copy(0, a);
      check_copy(1, b);
      check_copy(2, c);
      check_pll(si, fi);
    join
  endtask

  initial begin
    repeat (3) @(negedge fin_lf);
    rst = 1'b0;
    phase(8,   127, 9,   240, 0);
    phase(510, 15,  255, 240, 1);
    phase(253, 254, 31,  240, 2);
    phase(127, 9,   510, 176, 1);
    check(n_even   > 0, "no even ratio exercised");
    check(n_odd    > 0, "no odd ratio exercised");
    check(n_sol2   > 0, "no 2^r-1 ratio exercised");
    check(n_switch > 1, "no ratio switch exercised");
    check(n_carry  > 0, "no delta-sigma carry exercised");
    check(n_up     > 0, "phase detector never signalled up");
    check(n_dn     > 0, "phase detector never signalled dn");
    $display("mechanisms: even=%0d odd=%0d sol2=%0d switch=%0d carry=%0d up=%0d dn=%0d",
             n_even, n_odd, n_sol2, n_switch, n_carry, n_up, n_dn);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin : watchdog
    #(4_000_000);
    failures++;
    $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
