// tb_atc_ctrl: self-checking test of the Arbitration Timing Control.
// Drives AR, GK, AL and AK as the masters of a segment would and checks:
//  * AG starts a cycle only with AR . GK* and no halt request;
//  * MSP is set T_TM1 + 1 cycles after AG(u) when AL /= 0;
//  * AG stays up while the current master holds AK and falls T_ATAK + 1
//    cycles after AK(d);
//  * GK(u) from the pending master clears MSP (grant event);
//  * AL = 0 at the end of TM1 clears AG without setting MSP (error event);
//  * without GK, MSP is cleared by the TM2 timeout T_TM2 + 1 cycles after AG(d).
module tb_atc_ctrl;
  import anc_pkg::*;
  localparam int unsigned T_TM1 = 5, T_ATAK = 3, T_TM2 = 8;
  logic clk = 1'b0;
  logic clr, ar, gk, ak, halt_req;
  logic [AL_W-1:0] al;
  logic ag, msp, ev_grant, ev_al_err, ev_tm2_to;
  int checks = 0, failures = 0;
  int n_grant = 0, n_err = 0, n_to = 0;

  atc_ctrl #(.T_TM1(T_TM1), .T_ATAK(T_ATAK), .T_TM2(T_TM2)) dut (
    .clk(clk), .clr(clr), .ar(ar), .gk(gk), .al(al), .ak_i(ak), .halt_req(halt_req),
    .ag(ag), .msp(msp), .ev_grant(ev_grant), .ev_al_err(ev_al_err), .ev_tm2_to(ev_tm2_to));

  always #5 clk = ~clk;

  always @(posedge clk) begin
    if (ev_grant)  n_grant++;
    if (ev_al_err) n_err++;
    if (ev_tm2_to) n_to++;
  end

  task automatic check(input bit cond, input string msg);
    checks++;
    if (!cond) begin failures++; $display("FAIL %s at %0t", msg, $time); end
  endtask

  task automatic cyc(input int n);
    repeat (n) @(posedge clk);
    #1;
  endtask

  // Count cycles until sig reaches val (limit 200).
  task automatic wait_for(ref logic sig, input logic val, output int n);
    n = 0;
    while (sig !== val && n < 200) begin @(posedge clk); #1; n++; end
  endtask

  initial begin
    int n;
    clr = 1'b1; ar = 1'b0; gk = 1'b0; ak = 1'b0; halt_req = 1'b0; al = '0;
    cyc(2); clr = 1'b0; cyc(2);
    check(!ag && !msp, "idle after clear");

    // --- GK held by the current master blocks a new cycle
    gk = 1'b1; ar = 1'b1; ak = 1'b1; cyc(5);
    check(!ag, "no arbitration while GK asserted");
    // --- halt request blocks a new cycle
    halt_req = 1'b1; @(negedge clk); gk = 1'b0; cyc(5);
    check(!ag, "no arbitration while halt requested");
    // --- normal cycle: current master still holds AS/AK
    @(negedge clk); halt_req = 1'b0; al = 6'h15;
    wait_for(ag, 1'b1, n);
    check(n == 1, $sformatf("AG(u) one cycle after AR.GK* (got %0d)", n));
    wait_for(msp, 1'b1, n);
    check(n == T_TM1 + 1, $sformatf("MSP after TM1 (got %0d)", n));
    cyc(20);
    check(ag && msp, "AG held while current master holds AK");
    @(negedge clk); ak = 1'b0; ar = 1'b0; al = '0;
    wait_for(ag, 1'b0, n);
    check(n == T_ATAK + 1, $sformatf("AG(d) ATAK after AK(d) (got %0d)", n));
    check(msp, "MSP held after AG(d)");
    cyc(3);
    @(negedge clk); gk = 1'b1; ak = 1'b1;
    @(posedge clk); #1;
    check(!msp, "GK(u) clears MSP");
    check(n_grant == 1, "grant event counted");
    // new master releases GK; no request: no new cycle
    cyc(3); @(negedge clk); gk = 1'b0; cyc(5);
    check(!ag, "no cycle without AR");

    // --- AL = 0 error
    @(negedge clk); ar = 1'b1; al = '0;
    wait_for(ag, 1'b1, n);
    wait_for(ag, 1'b0, n);
    check(n == T_TM1 + 1, $sformatf("AG cleared after TM1 on AL = 0 (got %0d)", n));
    check(!msp, "no MSP on AL = 0");
    check(n_err >= 1, "AL error event counted");
    @(negedge clk); ar = 1'b0; cyc(3);

    // --- TM2 timeout: bus idle (AK = 0), pending master never answers
    ak = 1'b0;
    @(negedge clk); ar = 1'b1; al = 6'h01;
    wait_for(ag, 1'b1, n);
    @(negedge clk); ar = 1'b0;
    wait_for(ag, 1'b0, n);
    check(n == T_TM1 + 1 + T_ATAK + 1, $sformatf("idle bus: AG(d) after TM1 + ATAK (got %0d)", n));
    check(msp, "MSP pending");
    wait_for(msp, 1'b0, n);
    check(n == T_TM2 + 1, $sformatf("MSP cleared by TM2 (got %0d)", n));
    check(n_to == 1, "timeout event counted");
    check(n_grant == 1, "no grant event on timeout");

    // --- clear in the middle of a cycle
    @(negedge clk); ar = 1'b1; al = 6'h02;
    wait_for(ag, 1'b1, n); cyc(2);
    clr = 1'b1; cyc(1); clr = 1'b0; ar = 1'b0;
    check(!ag && !msp, "clear aborts the cycle");
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
