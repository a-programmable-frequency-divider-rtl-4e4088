// Exhaustive self-checking testbench of the N-bit half adder (N = 8):
// every a and cin, compared with the integer sum a + cin.
module tb_half_adder_n;
  localparam int unsigned N = 8;
  logic [N-1:0] a, s;
  logic         cin, cout;
  int           checks = 0, failures = 0;

  half_adder_n #(.N(N)) dut (.a(a), .cin(cin), .s(s), .cout(cout));

  initial begin
    for (int i = 0; i < (1 << N); i++) begin
      for (int c = 0; c < 2; c++) begin
        a = N'(i); cin = c[0];
        #1;
        checks++;
        if ({cout, s} != (N+1)'(i + c)) begin
          failures++;
          $display("FAIL: %0d + %0d gave %0d", i, c, {cout, s});
        end
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
