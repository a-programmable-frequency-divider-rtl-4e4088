// Workload testbench: every division ratio of the published measurement tables.
//
// The programmable divider (default size) is run with each ratio that the
// fabricated part was measured with, grouped by the input frequency of the
// measurement (2.9 GHz, 500 MHz, 50 MHz, 10 MHz, 1 MHz, 100 kHz, 10 kHz, 1 kHz).
// For each entry the testbench measures three output periods and the high time in
// input cycles and compares
//   - the output frequency f_in / period with the calculated output frequency of
//     the table (relative error below 0.1 %, the tables print 4 digits), and
//   - the duty cycle high / period with the calculated duty cycle of the table,
//     to within 0.1 percentage point.
// The tables round some duty cycles down (13 -> 46.1 %, 15 -> 46.6 %, 31 ->
// 48.3 %); the tolerance covers that.  For ratio 39 the table's calculated column
// reads 49.7 % while its measured column and 19/39 give 48.7 %; 48.7 % is used.
// The simulated input clock is always the same; only cycle counts are compared.
module tb_measured_ratios;
  typedef struct {
    int  n;          // division ratio
    real fin_hz;     // input frequency of the measurement
    real fout_hz;    // calculated output frequency listed
    real duty_pct;   // calculated output duty cycle listed (%)
  } entry_t;

  localparam int NE = 78;
  entry_t tab[NE];

  logic       fin = 1'b0, rst = 1'b1;
  logic [8:0] s = 9'd8;
  logic       fout, fout_origin, sol2_active;
  logic [8:0] p_q;
  int         period, high, rises;
  int         checks = 0, failures = 0;

  prog_divider dut (
    .fin(fin), .rst(rst), .s(s), .fout(fout), .fout_origin(fout_origin),
    .sol2_active(sol2_active), .p_q(p_q)
  );
  period_mon mon (.clk(fin), .sig(fout), .period(period), .high(high), .rises(rises));

  always #5 fin = ~fin;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  task automatic add(inout int i, input real fin_hz, input int n, input real fout, input real duty);
    tab[i] = '{n: n, fin_hz: fin_hz, fout_hz: fout, duty_pct: duty};
    i++;
  endtask

  initial begin
    int i = 0;
    // 2.9 GHz
    add(i, 2.9e9, 127, 22.83e6, 49.6); add(i, 2.9e9, 240, 12.08e6, 50.0);
    add(i, 2.9e9, 252, 11.51e6, 50.0); add(i, 2.9e9, 253, 11.46e6, 49.8);
    add(i, 2.9e9, 254, 11.42e6, 50.0); add(i, 2.9e9, 255, 11.37e6, 49.8);
    add(i, 2.9e9, 510, 5.686e6, 50.0);
    // 500 MHz
    add(i, 500e6, 15, 33.33e6, 46.7);  add(i, 500e6, 16, 31.25e6, 50.0);
    add(i, 500e6, 17, 29.41e6, 47.1);  add(i, 500e6, 31, 16.13e6, 48.4);
    add(i, 500e6, 61, 8.197e6, 49.2);  add(i, 500e6, 63, 7.937e6, 49.2);
    add(i, 500e6, 125, 4.0e6, 49.6);   add(i, 500e6, 251, 1.992e6, 49.8);
    add(i, 500e6, 509, 0.9823e6, 49.9); add(i, 500e6, 510, 0.9804e6, 50.0);
    // 50 MHz
    add(i, 50e6, 8, 6.25e6, 50.0);     add(i, 50e6, 9, 5.556e6, 44.4);
    add(i, 50e6, 11, 4.545e6, 45.5);   add(i, 50e6, 15, 3.333e6, 46.7);
    add(i, 50e6, 31, 1.613e6, 48.4);   add(i, 50e6, 61, 0.8197e6, 49.2);
    add(i, 50e6, 125, 0.4e6, 49.6);    add(i, 50e6, 127, 0.3937e6, 49.6);
    add(i, 50e6, 251, 0.1992e6, 49.8); add(i, 50e6, 255, 0.1961e6, 49.8);
    add(i, 50e6, 509, 0.09823e6, 49.9);
    // 10 MHz
    add(i, 10e6, 8, 1250e3, 50.0);     add(i, 10e6, 9, 1111.1e3, 44.4);
    add(i, 10e6, 13, 769.2e3, 46.1);   add(i, 10e6, 15, 666.7e3, 46.6);
    add(i, 10e6, 29, 344.8e3, 48.3);   add(i, 10e6, 31, 322.6e3, 48.3);
    add(i, 10e6, 45, 222.2e3, 48.9);   add(i, 10e6, 59, 169.5e3, 49.1);
    add(i, 10e6, 111, 90.09e3, 49.5);  add(i, 10e6, 123, 81.3e3, 49.6);
    // 1 MHz
    add(i, 1e6, 9, 111.1e3, 44.4);     add(i, 1e6, 15, 66.67e3, 46.7);
    add(i, 1e6, 17, 58.82e3, 47.1);    add(i, 1e6, 25, 40e3, 48.0);
    add(i, 1e6, 31, 32.26e3, 48.4);    add(i, 1e6, 33, 30.3e3, 48.5);
    add(i, 1e6, 41, 24.39e3, 48.8);    add(i, 1e6, 60, 16.67e3, 50.0);
    add(i, 1e6, 63, 15.87e3, 49.2);    add(i, 1e6, 71, 14.08e3, 49.3);
    // 100 kHz
    add(i, 100e3, 9, 11.11e3, 44.4);   add(i, 100e3, 12, 8.333e3, 50.0);
    add(i, 100e3, 15, 6.667e3, 46.7);  add(i, 100e3, 21, 4.762e3, 47.6);
    add(i, 100e3, 27, 3.704e3, 48.1);  add(i, 100e3, 31, 3.226e3, 48.4);
    add(i, 100e3, 47, 2.128e3, 48.9);  add(i, 100e3, 57, 1.754e3, 49.1);
    add(i, 100e3, 63, 1.587e3, 49.2);  add(i, 100e3, 125, 0.8e3, 49.6);
    // 10 kHz
    add(i, 10e3, 10, 1000, 50.0);      add(i, 10e3, 15, 666.7, 46.7);
    add(i, 10e3, 17, 588.2, 47.1);     add(i, 10e3, 19, 526.3, 47.4);
    add(i, 10e3, 24, 416.7, 50.0);     add(i, 10e3, 25, 400, 48.0);
    add(i, 10e3, 33, 303, 48.5);       add(i, 10e3, 55, 181.8, 49.1);
    add(i, 10e3, 65, 153.8, 49.2);     add(i, 10e3, 127, 78.74, 49.6);
    // 1 kHz
    add(i, 1e3, 11, 90.91, 45.5);      add(i, 1e3, 15, 66.67, 46.7);
    add(i, 1e3, 20, 50, 50.0);         add(i, 1e3, 31, 32.26, 48.4);
    add(i, 1e3, 35, 28.57, 48.6);      add(i, 1e3, 39, 25.64, 48.7);
    add(i, 1e3, 63, 15.87, 49.2);      add(i, 1e3, 67, 14.93, 49.3);
    add(i, 1e3, 81, 12.35, 49.4);      add(i, 1e3, 121, 8.264, 49.6);
    check(i == NE, "table size");

    repeat (3) @(negedge fin);
    rst = 1'b0;
    foreach (tab[k]) begin
      int  r;
      real f, d;
      s = 9'(tab[k].n);
      r = rises;
      wait (rises >= r + 3);
      for (int j = 0; j < 3; j++) begin
        r = rises;
        wait (rises == r + 1);
        f = tab[k].fin_hz / real'(period);
        d = 100.0 * real'(high) / real'(period);
        check((f - tab[k].fout_hz) / tab[k].fout_hz < 1.0e-3 &&
              (tab[k].fout_hz - f) / tab[k].fout_hz < 1.0e-3,
              $sformatf("fin=%g N=%0d fout %g, table %g", tab[k].fin_hz, tab[k].n, f, tab[k].fout_hz));
        check(d - tab[k].duty_pct < 0.1001 && tab[k].duty_pct - d < 0.1001,
              $sformatf("fin=%g N=%0d duty %.2f%%, table %.1f%%", tab[k].fin_hz, tab[k].n, d, tab[k].duty_pct));
      end
    end
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
