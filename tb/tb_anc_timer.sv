// tb_anc_timer: self-checking test of the interval timer.
// Holds EN for various lengths and checks that DONE rises exactly N cycles
// after EN was first sampled, stays up while EN stays up, and that dropping
// EN or asserting CLR restarts the interval.
module tb_anc_timer;
  localparam int unsigned N = 5;
  logic clk = 1'b0;
  logic clr, en, done;
  int checks = 0, failures = 0;

  anc_timer #(.N(N)) dut (.clk(clk), .clr(clr), .en(en), .done(done));

  always #5 clk = ~clk;

  task automatic check(input bit cond, input string msg);
    checks++;
    if (!cond) begin failures++; $display("FAIL %s at %0t", msg, $time); end
  endtask

  // Hold EN for len cycles; return the cycle index at which DONE was first seen.
  task automatic run(input int len, output int first);
    first = -1;
    en = 1'b1;
    for (int i = 0; i < len; i++) begin
      @(posedge clk); #1;
      if (done && first < 0) first = i + 1;
    end
    en = 1'b0; #1;
    check(!done, "done low after en drops");
    @(posedge clk); #1;
  endtask

  initial begin
    int first;
    clr = 1'b1; en = 1'b0;
    repeat (3) @(posedge clk); #1;
    check(!done, "done low under clr");
    clr = 1'b0;
    run(N + 4, first);
    check(first == N, $sformatf("done after N cycles (got %0d)", first));
    run(N - 1, first);
    check(first == -1, "no done for a short enable");
    run(N + 1, first);
    check(first == N, "interval restarts after en drop");
    // clear in the middle of an interval
    en = 1'b1;
    repeat (3) @(posedge clk); #1;
    clr = 1'b1; @(posedge clk); #1; clr = 1'b0;
    first = -1;
    for (int i = 0; i < N + 2; i++) begin
      @(posedge clk); #1;
      if (done && first < 0) first = i + 1;
    end
    check(first == N, "clr restarts the interval");
    check(done, "done held while en held");
    en = 1'b0;
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
