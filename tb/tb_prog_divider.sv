// Self-checking testbench of prog_divider at its default size (ratios 8 .. 511).
//
// Sweeps every ratio in range.  For each ratio it lets the divider settle for
// three output periods and then measures four output periods, counting input
// clock cycles (sampled on falling fin edges) between output edges.  Expected:
// period = N; high time = N/2 for even N and (N-1)/2 for odd N (duty k/(2k+1)).
// It also checks which correction scheme is active (Solution 2 exactly for
// N = 2^r - 1) and that the narrow-pulse chain output runs at fin / (N/2) for
// even N.  A watchdog ends the run if the divider stops toggling.
module tb_prog_divider;
  localparam int unsigned NST = 8;
  localparam int unsigned NMIN = 8;
  localparam int unsigned NMAX = (1 << (NST + 1)) - 1;

  logic           fin = 1'b0;
  logic           rst = 1'b1;
  logic [NST:0]   s   = '0;
  logic           fout, fout_origin, sol2_active;
  logic [NST:0]   p_q;
  int             checks = 0, failures = 0;
  longint         cyc = 0;

  prog_divider #(.NSTAGES(NST)) dut (
    .fin(fin), .rst(rst), .s(s), .fout(fout), .fout_origin(fout_origin),
    .sol2_active(sol2_active), .p_q(p_q)
  );

  always #5 fin = ~fin;
  always @(negedge fin) cyc++;

  function automatic bit is_2r_1(int unsigned n);
    return n >= 3 && ((n & (n + 1)) == 0);
  endfunction

  // waits for the next rising edge of sig, sampled on falling fin edges;
  // returns the cycle number of that sample
  task automatic wait_rise(ref logic sig, output longint at);
    logic prev;
    prev = sig;
    forever begin
      @(negedge fin);
      if (sig && !prev) break;
      prev = sig;
    end
    at = cyc;
  endtask

  task automatic wait_fall(ref logic sig, output longint at);
    logic prev;
    prev = sig;
    forever begin
      @(negedge fin);
      if (!sig && prev) break;
      prev = sig;
    end
    at = cyc;
  endtask

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL: %s", what);
    end
  endtask

  initial begin
    longint r0, f0, r1, t0, t1;
    repeat (4) @(negedge fin);
    rst = 1'b0;
    for (int unsigned n = NMIN; n <= NMAX; n++) begin
      s = (NST+1)'(n);
      repeat (3) wait_rise(fout, r0);
      for (int k = 0; k < 4; k++) begin
        wait_fall(fout, f0);
        wait_rise(fout, r1);
        check(r1 - r0 == longint'(n),
              $sformatf("N=%0d period %0d", n, r1 - r0));
        check(f0 - r0 == longint'(n / 2),
              $sformatf("N=%0d high time %0d, expected %0d", n, f0 - r0, n / 2));
        r0 = r1;
      end
      check(sol2_active == is_2r_1(n),
            $sformatf("N=%0d solution-2 flag %0b", n, sol2_active));
      if (n % 2 == 0) begin
        wait_rise(fout_origin, t0);
        wait_rise(fout_origin, t1);
        check(t1 - t0 == longint'(n / 2),
              $sformatf("N=%0d chain period %0d", n, t1 - t0));
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin : watchdog
    #(10 * 3_000_000);
    failures++;
    $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
