// Exhaustive self-checking testbench of the division-ratio judgment (N = 8):
// for every 9-bit word, select_sol2 must be 1 exactly for 3, 7, 15, ..., 511, and
// the per-index flag div_2r_1[i] exactly for the word 2^(i+1) - 1.
module tb_ratio_judge;
  localparam int unsigned N = 8;
  logic [N:0] s, flags;
  logic       sel;
  int         checks = 0, failures = 0;

  ratio_judge #(.N(N)) dut (.s(s), .div_2r_1(flags), .select_sol2(sel));

  initial begin
    for (int v = 0; v < (1 << (N + 1)); v++) begin
      bit exp_sel;
      logic [N:0] exp_flags;
      s = (N+1)'(v);
      #1;
      exp_sel = 1'b0;
      exp_flags = '0;
      for (int i = 1; i <= N; i++)
        if (v == (1 << (i + 1)) - 1) begin exp_sel = 1'b1; exp_flags[i] = 1'b1; end
      checks++;
      if (sel != exp_sel || flags != exp_flags) begin
        failures++;
        $display("FAIL: s=%0d select=%0b flags=%b", v, sel, flags);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin : watchdog
    #100000;
    failures++;
    $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
