// Self-checking testbench of the extended-range 2/3-cell chain at its default size.
//
// Sweeps every control word p = 4 .. 511 and measures the period of fout_origin in
// input cycles (after two periods of settling) over three periods.  The expected
// ratio is computed from the range-extension rule: p itself when p >= 8, and
// 4 + p[1:0] below that (the bit P2 is then ignored).  The high time of
// fout_origin must be one output cycle of the first cell: 2 input cycles for even
// and 3 for odd ratios (duty 2/N or 3/N).
// A watchdog ends the run after a fixed number of cycles.
module tb_vaucher_div;
  localparam int unsigned NST = 8;

  logic             fin = 1'b0, rst = 1'b1;
  logic [NST:0]     p = '0;
  logic [NST-1:0]   mod;
  logic             fout_origin;
  int               checks = 0, failures = 0;
  longint           cyc = 0;

  vaucher_div #(.NSTAGES(NST), .VMIN(2)) dut (
    .fin(fin), .rst(rst), .p(p), .mod(mod), .fout_origin(fout_origin)
  );

  always #5 fin = ~fin;
  always @(negedge fin) cyc++;

  function automatic int unsigned expected_ratio(int unsigned pv);
    if (pv >= 8) return pv;
    return 4 + (pv & 3);
  endfunction

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; if (failures < 20) $display("FAIL: %s", what); end
  endtask

  task automatic wait_edge(input bit rising, output longint at);
    logic prev;
    prev = fout_origin;
    forever begin
      @(negedge fin);
      if (fout_origin == rising && prev != rising) break;
      prev = fout_origin;
    end
    at = cyc;
  endtask

  initial begin
    longint r0, r1, f0;
    repeat (3) @(negedge fin);
    rst = 1'b0;
    for (int unsigned pv = 4; pv < (1 << (NST + 1)); pv++) begin
      p = (NST+1)'(pv);
      repeat (2) wait_edge(1'b1, r0);
      for (int k = 0; k < 3; k++) begin
        wait_edge(1'b0, f0);
        wait_edge(1'b1, r1);
        check(r1 - r0 == longint'(expected_ratio(pv)),
              $sformatf("p=%0d period %0d expected %0d", pv, r1 - r0, expected_ratio(pv)));
        check(f0 - r0 == 2 + longint'(pv & 1), $sformatf("p=%0d pulse width %0d", pv, f0 - r0));
        r0 = r1;
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin : watchdog
    #(10 * 2_000_000);
    failures++;
    $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
