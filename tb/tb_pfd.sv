// Self-checking testbench of the phase/frequency detector.
//
// Applies pairs of rising edges on ref_clk and div_clk with a known offset d
// (in time units, positive when ref leads) and measures how long up and dn are
// high.  Expected: ref leads by d -> up high for d, dn high for 0; div leads by d
// -> dn high for d, up high for 0; equal edges -> neither stays high.  It then
// applies two ref edges with no div edge between them (a frequency difference):
// up must rise on the first and stay high.
module tb_pfd;
  logic ref_clk = 1'b0, div_clk = 1'b0, rst = 1'b1;
  logic up, dn;
  int   checks = 0, failures = 0;
  longint up_w = 0, dn_w = 0, t_up = 0, t_dn = 0;

  pfd dut (.ref_clk(ref_clk), .div_clk(div_clk), .rst(rst), .up(up), .dn(dn));

  always @(posedge up) t_up = $time;
  always @(negedge up) up_w += $time - t_up;
  always @(posedge dn) t_dn = $time;
  always @(negedge dn) dn_w += $time - t_dn;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  task automatic pair(input int d);
    up_w = 0; dn_w = 0;
    if (d >= 0) begin
      ref_clk = 1'b1; #(d) div_clk = 1'b1;
    end else begin
      div_clk = 1'b1; #(-d) ref_clk = 1'b1;
    end
    #20;
    ref_clk = 1'b0; div_clk = 1'b0;
    #20;
    check(up == 1'b0 && dn == 1'b0, $sformatf("d=%0d not idle after the pair", d));
    check(up_w == longint'(d > 0 ? d : 0), $sformatf("d=%0d up width %0d", d, up_w));
    check(dn_w == longint'(d < 0 ? -d : 0), $sformatf("d=%0d dn width %0d", d, dn_w));
  endtask

  initial begin
    #10 rst = 1'b0;
    #10;
    check(up == 1'b0 && dn == 1'b0, "not idle after reset");
    for (int i = 0; i < 40; i++) pair($urandom_range(0, 200) - 100);
    pair(0);
    // frequency difference: two ref edges, no div edge
    ref_clk = 1'b1; #10 ref_clk = 1'b0; #10;
    check(up == 1'b1 && dn == 1'b0, "up not set by a lone ref edge");
    ref_clk = 1'b1; #10 ref_clk = 1'b0; #10;
    check(up == 1'b1 && dn == 1'b0, "up did not stay set over a second ref edge");
    div_clk = 1'b1; #10 div_clk = 1'b0; #10;
    check(up == 1'b0 && dn == 1'b0, "div edge did not clear the detector");
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
