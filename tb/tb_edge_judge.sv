// Exhaustive self-checking testbench of the on-edge judgment (N = 8): for every
// 9-bit word the output must be the one-hot position of its leading 1 (0 for 0).
module tb_edge_judge;
  localparam int unsigned N = 8;
  logic [N:0] p, on_edge;
  int         checks = 0, failures = 0;

  edge_judge #(.N(N)) dut (.p(p), .on_edge(on_edge));

  initial begin
    for (int v = 0; v < (1 << (N + 1)); v++) begin
      logic [N:0] exp_oh;
      p = (N+1)'(v);
      #1;
      exp_oh = '0;
      for (int i = N; i >= 0; i--) if (v >= (1 << i)) begin exp_oh[i] = 1'b1; break; end
      checks++;
      if (on_edge != exp_oh) begin
        failures++;
        $display("FAIL: p=%0d on_edge=%b", v, on_edge);
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
