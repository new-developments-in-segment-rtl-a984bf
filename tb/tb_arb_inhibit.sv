// tb_arb_inhibit: self-checking test of the Arbitration Inhibit flip-flop.
// AI must rise in the cycle after AG(u), stay up while AR is asserted, ignore
// AR gaps shorter than TM3, and fall T_TM3 + 1 cycles after AR drops.
module tb_arb_inhibit;
  localparam int unsigned T_TM3 = 6;
  logic clk = 1'b0;
  logic clr, ag, ar, ai;
  int checks = 0, failures = 0;

  arb_inhibit #(.T_TM3(T_TM3)) dut (.clk(clk), .clr(clr), .ag(ag), .ar(ar), .ai(ai));

  always #5 clk = ~clk;

  task automatic check(input bit cond, input string msg);
    checks++;
    if (!cond) begin failures++; $display("FAIL %s at %0t", msg, $time); end
  endtask

  task automatic cyc(input int n);
    repeat (n) @(posedge clk);
    #1;
  endtask

  initial begin
    int n;
    clr = 1'b1; ag = 1'b0; ar = 1'b0;
    cyc(2); clr = 1'b0; cyc(2);
    check(!ai, "AI clear after reset");
    ar = 1'b1; cyc(3);
    check(!ai, "AR alone does not set AI");
    ag = 1'b1; cyc(1);
    check(ai, "AI set at AG(u)");
    ag = 1'b0; cyc(20);
    check(ai, "AI held while AR asserted");
    // short AR gap
    ar = 1'b0; cyc(T_TM3 - 2); ar = 1'b1; cyc(5);
    check(ai, "short AR gap ignored");
    // AR released: AI falls after TM3
    @(negedge clk); ar = 1'b0; n = 0;
    while (ai && n < 100) begin @(posedge clk); #1; n++; end
    check(n == T_TM3 + 1, $sformatf("AI falls after TM3 plus the register (got %0d)", n));
    // AG held high does not re-set AI (edge triggered)
    ag = 1'b1; cyc(1); check(ai, "second cycle sets AI");
    n = 0;
    while (ai && n < 100) begin @(posedge clk); #1; n++; end
    cyc(5);
    check(!ai, "AI stays clear while AG stays high");
    ag = 1'b0;
    // clr overrides
    cyc(1); ag = 1'b1; cyc(1); ag = 1'b0; ar = 1'b1;
    check(ai, "AI set again");
    clr = 1'b1; cyc(1); clr = 1'b0;
    check(!ai, "clr clears AI");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
