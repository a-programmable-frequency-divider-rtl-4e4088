// Self-checking testbench of the first-order delta-sigma accumulator (2 bits).
// For each fraction 0..3 it runs 16 clocks and compares carry and acc with a
// reference accumulator kept in the testbench; it also checks that carry is 1
// exactly frac times in every 4 consecutive clocks.
module tb_dsm_accum;
  localparam int unsigned FB = 2;
  logic          clk = 1'b0, rst = 1'b1, carry;
  logic [FB-1:0] frac = '0, acc;
  int            checks = 0, failures = 0;

  dsm_accum #(.FBITS(FB)) dut (.clk(clk), .rst(rst), .frac(frac), .carry(carry), .acc(acc));

  always #5 clk = ~clk;

  initial begin
    int ref_acc, ref_c, ones;
    repeat (2) @(negedge clk);
    rst = 1'b0;
    ref_acc = 0;
    for (int f = 0; f < (1 << FB); f++) begin
      frac = FB'(f);
      ones = 0;
      for (int k = 0; k < 16; k++) begin
        @(negedge clk);
        ref_c   = (ref_acc + f) >> FB;
        ref_acc = (ref_acc + f) % (1 << FB);
        ones += ref_c;
        checks++;
        if (carry != ref_c[0] || acc != FB'(ref_acc)) begin
          failures++;
          $display("FAIL: frac=%0d step %0d carry=%0b acc=%0d", f, k, carry, acc);
        end
      end
      checks++;
      if (ones != 4 * f) begin failures++; $display("FAIL: frac=%0d carries %0d", f, ones); end
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
