// Workload testbench: the fractional PLL locks at the measured fractional ratios.
//
// The test chip's PLL divider and phase detector are closed into a loop with a
// behavioural charge-pump / loop-filter / VCO model.  One time unit stands for
// 1 ps: the reference is 10 MHz (period 100000) and the VCO starts free-running
// near 2.4 GHz.  For each ratio the PLL was measured with (240, 240.25, 240.5 and
// 176.25) the loop is given time to settle, and then the VCO edges are counted
// over 400 reference periods; the count must equal 400 * ratio to within 2 VCO
// cycles (the delta-sigma pattern and the residual phase error move it slightly).
// The three integer dividers of the chip are left idle.
module tb_pll_lock;
  localparam longint TREF = 100_000;

  logic       rst = 1'b1;
  logic       pll_ref = 1'b0, vco;
  logic [8:0] pll_int = 9'd240;
  logic [1:0] pll_frac = 2'd0;
  logic       fout_hf, fout_ring, fout_lf, pll_fdiv, pll_up, pll_dn;
  real        period;
  int         checks = 0, failures = 0;
  longint     vco_edges = 0;

  divider_chip dut (
    .rst(rst),
    .fin_hf(1'b0), .ratio_hf(9'd8), .fout_hf(fout_hf),
    .fin_ring(1'b0), .ratio_ring(9'd8), .fout_ring(fout_ring),
    .fin_lf(1'b0), .ratio_lf(9'd8), .fout_lf(fout_lf),
    .vco_clk(vco), .pll_int(pll_int), .pll_frac(pll_frac), .pll_fdiv(pll_fdiv),
    .pll_ref(pll_ref), .pll_up(pll_up), .pll_dn(pll_dn)
  );

  // a VCO period change of KP*e per reference cycle; N*KP ~ 0.3, N*KI ~ 0.02
  pll_loop_model #(.T0(410.0), .KP(1.2e-3), .KI(8.0e-5)) analog (
    .ref_clk(pll_ref), .up(pll_up), .dn(pll_dn), .vco(vco), .period(period)
  );

  always #(TREF / 2) pll_ref = ~pll_ref;
  always @(posedge vco) vco_edges++;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  task automatic lock_at(input int si, input int fi);
    longint e0, cnt, expect4;
    pll_int  = 9'(si);
    pll_frac = 2'(fi);
    repeat (1500) @(posedge pll_ref);
    e0 = vco_edges;
    repeat (400) @(posedge pll_ref);
    cnt = vco_edges - e0;
    expect4 = 4 * (400 * si) + 400 * fi;   // 4 * 400 * (si + fi/4)
    check(4 * cnt - expect4 <= 8 && expect4 - 4 * cnt <= 8,
          $sformatf("ratio %0d+%0d/4: %0d VCO cycles in 400 reference cycles, expected %0.2f",
                    si, fi, cnt, real'(expect4) / 4.0));
    $display("ratio %0d + %0d/4: VCO period %.3f, %0d cycles per 400 reference cycles",
             si, fi, period, cnt);
  endtask

  initial begin
    #(TREF / 4) rst = 1'b0;
    lock_at(240, 0);
    lock_at(240, 1);
    lock_at(240, 2);
    lock_at(176, 1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin : watchdog
    #(TREF * 9000);
    failures++;
    $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
