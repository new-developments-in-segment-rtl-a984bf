// tb_rb_integrator: self-checking test of the reset-bus integration.
// RB pulses shorter than T_RB cycles must not produce a reset; a pulse held
// for T_RB cycles must raise RB_INT and, while the segment is not halted,
// SEG_CLR. While BH is asserted an integrated RB must not clear the segment.
// PWR_CLR must always appear on SEG_CLR.
module tb_rb_integrator;
  localparam int unsigned T_RB = 8;
  logic clk = 1'b0;
  logic pwr_clr, rb, bh, rb_int, seg_clr;
  int checks = 0, failures = 0;

  rb_integrator #(.T_RB(T_RB)) dut (.clk(clk), .pwr_clr(pwr_clr), .rb(rb), .bh(bh),
                                    .rb_int(rb_int), .seg_clr(seg_clr));

  always #5 clk = ~clk;

  task automatic check(input bit cond, input string msg);
    checks++;
    if (!cond) begin failures++; $display("FAIL %s at %0t", msg, $time); end
  endtask

  // Pulse RB for len cycles; report whether RB_INT / SEG_CLR were seen and when.
  task automatic pulse(input int len, output bit saw_int, output bit saw_clr, output int first);
    saw_int = 0; saw_clr = 0; first = -1;
    @(negedge clk); rb = 1'b1;
    for (int i = 0; i < len; i++) begin
      @(posedge clk); #1;
      if (rb_int) begin saw_int = 1; if (first < 0) first = i + 1; end
      if (seg_clr) saw_clr = 1;
    end
    @(negedge clk); rb = 1'b0;
    @(posedge clk); #1;
    check(!rb_int, "rb_int drops after rb");
  endtask

  initial begin
    bit si, sc; int first;
    pwr_clr = 1'b1; rb = 1'b0; bh = 1'b0;
    repeat (2) @(posedge clk); #1;
    check(seg_clr, "pwr_clr reaches seg_clr");
    pwr_clr = 1'b0; #1;
    check(!seg_clr && !rb_int, "idle after power clear");
    pulse(T_RB - 1, si, sc, first);
    check(!si && !sc, "short RB pulse ignored");
    pulse(T_RB + 3, si, sc, first);
    check(si && sc, "long RB pulse clears the segment");
    check(first == T_RB, $sformatf("integration time (got %0d)", first));
    bh = 1'b1;
    pulse(T_RB + 3, si, sc, first);
    check(si && !sc, "integrated RB ignored while halted");
    bh = 1'b0;
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
