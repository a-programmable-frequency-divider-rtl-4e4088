// Self-checking testbench of one 2/3 cell.
//
// For every combination of p and a constant mod_in it measures, in input clock
// cycles sampled on falling ck edges, the period of fo, the high time of fo and the
// high and low times of mod_out.  Expected (independent of the cell):
//   mod_in = 0: fo period 2, mod_out never high;
//   mod_in = 1: fo period 2 + p, mod_out high 1 cycle and low 1 + p cycles.
// A watchdog ends the run after a fixed number of cycles.
module tb_cell23;
  logic ck = 1'b0, rst = 1'b1, p = 1'b0, mod_in = 1'b0;
  logic fo, mod_out;
  int   checks = 0, failures = 0;

  cell23 dut (.ck(ck), .rst(rst), .p(p), .mod_in(mod_in), .fo(fo), .mod_out(mod_out));

  always #5 ck = ~ck;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    logic  fo_prev, mo_prev;
    int    t, fo_rise, fo_fall, mo_rise, mo_fall, fo_per, fo_high, mo_high, mo_low, mo_seen;
    repeat (3) @(negedge ck);
    rst = 1'b0;
    for (int mi = 0; mi < 2; mi++) begin
      for (int pp = 0; pp < 2; pp++) begin
        mod_in = mi[0];
        p      = pp[0];
        repeat (8) @(negedge ck);
        fo_prev = fo; mo_prev = mod_out;
        fo_rise = -1; fo_fall = -1; mo_rise = -1; mo_fall = -1;
        fo_per = 0; fo_high = 0; mo_high = 0; mo_low = 0; mo_seen = 0;
        for (t = 0; t < 60; t++) begin
          @(negedge ck);
          if (fo && !fo_prev) begin
            if (fo_rise >= 0) begin
              check(t - fo_rise == 2 + (mi & pp), $sformatf("mod_in=%0d p=%0d fo period %0d", mi, pp, t - fo_rise));
            end
            fo_rise = t;
          end
          if (!fo && fo_prev && fo_rise >= 0)
            check(t - fo_rise == 1, $sformatf("mod_in=%0d p=%0d fo high %0d", mi, pp, t - fo_rise));
          if (mod_out) mo_seen++;
          if (mod_out && !mo_prev) begin
            if (mo_fall >= 0)
              check(t - mo_fall == 1 + (mi & pp), $sformatf("p=%0d mod_out low %0d", pp, t - mo_fall));
            mo_rise = t;
          end
          if (!mod_out && mo_prev && mo_rise >= 0) begin
            check(t - mo_rise == 1, $sformatf("p=%0d mod_out high %0d", pp, t - mo_rise));
            mo_fall = t;
          end
          fo_prev = fo; mo_prev = mod_out;
        end
        if (mi == 0) check(mo_seen == 0, "mod_out high while mod_in = 0");
        else         check(mo_seen == 60 / (2 + pp), $sformatf("p=%0d mod_out pulses %0d", pp, mo_seen));
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin : watchdog
    #(10 * 2000);
    failures++;
    $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
