// tb_power_on_clear: self-checking test of the PWR CLR generator.
// Checks that PWR CLR is asserted while power is down and for exactly
// T_PWR + 2 cycles (two synchroniser stages plus the pulse) after power-good
// rises, then released, and that a power dip re-asserts it immediately.
module tb_power_on_clear;
  localparam int unsigned T_PWR = 6;
  logic clk = 1'b0;
  logic por_n, pwr_clr;
  int checks = 0, failures = 0;

  power_on_clear #(.T_PWR(T_PWR)) dut (.clk(clk), .por_n(por_n), .pwr_clr(pwr_clr));

  always #5 clk = ~clk;

  task automatic check(input bit cond, input string msg);
    checks++;
    if (!cond) begin failures++; $display("FAIL %s at %0t", msg, $time); end
  endtask

  task automatic power_up(output int len);
    len = 0;
    @(negedge clk); por_n = 1'b1;
    while (pwr_clr && len < 100) begin @(posedge clk); #1; len++; end
  endtask

  initial begin
    int len;
    por_n = 1'b1; #1;   // a falling edge: two-state simulators start at 0
    por_n = 1'b0; #1;
    check(pwr_clr, "pwr_clr while power down");
    repeat (4) @(posedge clk); #1;
    check(pwr_clr, "pwr_clr held while power down");
    power_up(len);
    check(len == T_PWR + 3, $sformatf("pulse length after power-good (got %0d)", len));
    repeat (10) @(posedge clk); #1;
    check(!pwr_clr, "pwr_clr stays released");
    @(negedge clk); por_n = 1'b0; #1;
    check(pwr_clr, "power dip asserts pwr_clr at once");
    repeat (2) @(posedge clk);
    power_up(len);
    check(len == T_PWR + 3, "pulse length after dip");
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
