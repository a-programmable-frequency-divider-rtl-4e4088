// Self-checking testbench of the divide-by-2: drives an irregular input clock
// (random high and low times) and checks that q changes exactly on each rising
// input edge, so q's high and low times each equal one input period.
module tb_div2;
  logic clk = 1'b0, rst = 1'b1, q;
  int   checks = 0, failures = 0;

  div2 dut (.clk(clk), .rst(rst), .q(q));

  initial begin
    logic expected;
    #3 rst = 1'b0;
    expected = 1'b0;
    #1;
    checks++;
    if (q !== 1'b0) begin failures++; $display("FAIL: q not 0 after reset"); end
    for (int i = 0; i < 200; i++) begin
      #($urandom_range(1, 9)) clk = 1'b1;
      expected = ~expected;
      #1;
      checks++;
      if (q != expected) begin failures++; $display("FAIL: edge %0d q=%0b", i, q); end
      #($urandom_range(1, 9)) clk = 1'b0;
      #1;
      checks++;
      if (q != expected) begin failures++; $display("FAIL: q changed on falling edge %0d", i); end
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
