// tb_sys_handshake: self-checking test of the broadcast System Handshake Logic.
// Two instances see the same bus: one with the mandatory behaviour only and
// one with the optional fast DK reset. Checked:
//  * no AK for a non-broadcast address cycle;
//  * AK(u)/AK(d) of a broadcast follow AS after dTA (T_DTA..T_DTA+2 cycles);
//  * DK(u)/DK(d) follow DS after dTD;
//  * a WT held by a segment interconnect delays the acknowledgement until WT
//    has been low for TM4;
//  * the fast-reset instance drops DK at once for a random (non-block) cycle,
//    but not for a block transfer.
module tb_sys_handshake;
  localparam int unsigned T_DTA = 10, T_DTD = 20, T_TM4 = 4;
  logic clk = 1'b0;
  logic clr, as_i, ds_i, wt;
  logic [1:0] ms;
  logic ak0, dk0, bc0, hold0, fr0;
  logic ak1, dk1, bc1, hold1, fr1;
  int checks = 0, failures = 0;
  int n_hold = 0, n_fast = 0;

  sys_handshake #(.T_DTA(T_DTA), .T_DTD(T_DTD), .T_TM4(T_TM4), .FAST_DK_RST(1'b0)) dut0 (
    .clk(clk), .clr(clr), .as_i(as_i), .ds_i(ds_i), .ms_i(ms), .wt_i(wt),
    .ak_drv(ak0), .dk_drv(dk0), .bc(bc0), .ev_wt_hold(hold0), .ev_fast_rst(fr0));
  sys_handshake #(.T_DTA(T_DTA), .T_DTD(T_DTD), .T_TM4(T_TM4), .FAST_DK_RST(1'b1)) dut1 (
    .clk(clk), .clr(clr), .as_i(as_i), .ds_i(ds_i), .ms_i(ms), .wt_i(wt),
    .ak_drv(ak1), .dk_drv(dk1), .bc(bc1), .ev_wt_hold(hold1), .ev_fast_rst(fr1));

  always #5 clk = ~clk;

  always @(posedge clk) begin
    if (hold0) n_hold++;
    if (fr1)   n_fast++;
  end

  task automatic check(input bit cond, input string msg);
    checks++;
    if (!cond) begin failures++; $display("FAIL %s at %0t", msg, $time); end
  endtask

  task automatic cyc(input int n);
    repeat (n) @(posedge clk);
    #1;
  endtask

  task automatic wait_for(ref logic sig, input logic val, output int n);
    n = 0;
    while (sig !== val && n < 500) begin @(posedge clk); #1; n++; end
  endtask

  function automatic bit in_win(int n, int lo);
    return n >= lo && n <= lo + 2;
  endfunction

  initial begin
    int n, m;
    clr = 1'b1; as_i = 1'b0; ds_i = 1'b0; wt = 1'b0; ms = 2'd0;
    cyc(2); clr = 1'b0; cyc(T_TM4 + 2);

    // --- ordinary (CSR) address cycle: SHL stays silent
    @(negedge clk); ms = 2'd1; as_i = 1'b1;
    cyc(3 * T_DTA);
    check(!ak0 && !bc0, "no AK for a non-broadcast cycle");
    @(negedge clk); as_i = 1'b0; cyc(3);

    // --- broadcast address cycle, last segment (no WT)
    @(negedge clk); ms = 2'd2; as_i = 1'b1;
    wait_for(ak0, 1'b1, n);
    check(in_win(n, T_DTA), $sformatf("AK(u) after dTA (got %0d)", n));
    check(bc0 && ak1, "broadcast open in both instances");

    // --- random data write cycle, WT held by a segment interconnect
    @(negedge clk); ms = 2'd0; wt = 1'b1; ds_i = 1'b1;
    cyc(T_DTD + 20);
    check(!dk0 && !dk1, "DK held while WT asserted");
    check(n_hold > 0, "WT hold seen");
    @(negedge clk); wt = 1'b0;
    wait_for(dk0, 1'b1, n);
    check(in_win(n, T_TM4), $sformatf("DK(u) TM4 after WT(d) (got %0d)", n));
    check(dk1, "DK(u) in fast-reset instance");
    // DS(d) of a random cycle
    @(negedge clk); ds_i = 1'b0;
    @(posedge clk); #1;
    check(!dk1, "fast reset drops DK at once");
    check(n_fast == 1, "fast reset counted");
    wait_for(dk0, 1'b0, n);
    check(in_win(n, T_DTD - 1), $sformatf("DK(d) after dTD without fast reset (got %0d)", n));

    // --- block transfer data cycle: DK follows DS both ways after dTD
    @(negedge clk); ms = 2'd1; ds_i = 1'b1;
    wait_for(dk0, 1'b1, n);
    check(in_win(n, T_DTD), $sformatf("block DK(u) after dTD (got %0d)", n));
    @(negedge clk); ds_i = 1'b0;
    m = 0;
    while (dk1 && m < 500) begin @(posedge clk); #1; m++; end
    check(in_win(m, T_DTD - 1), $sformatf("block DK(d) keeps dTD with fast reset (got %0d)", m));
    wait_for(dk0, 1'b0, n);
    check(n <= 1, "block DK(d) in mandatory instance");
    check(n_fast == 1, "no fast reset for block transfer");

    // --- end of the broadcast
    @(negedge clk); as_i = 1'b0;
    wait_for(ak0, 1'b0, n);
    check(in_win(n, T_DTA - 1), $sformatf("AK(d) after dTA (got %0d)", n));
    cyc(2);
    check(!bc0 && !bc1, "broadcast closed");

    // --- broadcast CSR (MS = 3) with WT on the address cycle
    @(negedge clk); ms = 2'd3; wt = 1'b1; as_i = 1'b1;
    cyc(T_DTA + 10);
    check(!ak0, "AK held by WT");
    @(negedge clk); wt = 1'b0;
    wait_for(ak0, 1'b1, n);
    check(in_win(n, T_TM4), $sformatf("AK(u) TM4 after WT(d) (got %0d)", n));
    @(negedge clk); as_i = 1'b0;
    wait_for(ak0, 1'b0, n);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
