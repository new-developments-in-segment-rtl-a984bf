// tb_atc_section: self-checking test of the ATC section as a whole.
// Checks the interplay of its parts with short timer settings:
//  * AG(u) sets AI; a full arbitration cycle ends with GK(u);
//  * a halt requested during an arbitration cycle takes effect only after
//    MSP is cleared and the bus is released, then holds AK and blocks AG;
//  * the segment clear resets AG/MSP/AI but not the halt;
//  * a broadcast AK appears on the section's AK driver and a broadcast DK
//    on its DK driver.
module tb_atc_section;
  import anc_pkg::*;
  localparam int unsigned T_ATAK = 2, T_TM1 = 4, T_TM2 = 10, T_TM3 = 3, T_TM4 = 2,
                          T_DTA = 6, T_DTD = 8;
  logic clk = 1'b0;
  always #5 clk = ~clk;

  logic pwr_clr, seg_clr, halt_sw, as_i, m_ak, ds_i, ar, gk, wt;
  logic [AL_W-1:0] al;
  logic [1:0] ms;
  logic ag, ai, bh, ak_o, dk_o, msp, bc;
  logic ev_grant, ev_al_err, ev_tm2_to, ev_wt_hold, ev_fast_rst;
  logic ak_bus;
  assign ak_bus = m_ak | ak_o;
  int checks = 0, failures = 0;

  atc_section #(.T_ATAK(T_ATAK), .T_TM1(T_TM1), .T_TM2(T_TM2), .T_TM3(T_TM3),
                .T_TM4(T_TM4), .T_DTA(T_DTA), .T_DTD(T_DTD)) dut (
    .clk(clk), .pwr_clr(pwr_clr), .seg_clr(seg_clr), .halt_sw(halt_sw),
    .as_i(as_i), .ak_i(ak_bus), .ds_i(ds_i), .ar_i(ar), .gk_i(gk), .al_i(al),
    .wt_i(wt), .ms_i(ms), .ag_o(ag), .ai_o(ai), .bh_o(bh), .ak_o(ak_o), .dk_o(dk_o),
    .msp(msp), .bc(bc), .ev_grant(ev_grant), .ev_al_err(ev_al_err),
    .ev_tm2_to(ev_tm2_to), .ev_wt_hold(ev_wt_hold), .ev_fast_rst(ev_fast_rst));

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
    while (sig !== val && n < 200) begin @(posedge clk); #1; n++; end
  endtask

  initial begin
    int n;
    pwr_clr = 1; seg_clr = 1; halt_sw = 0; as_i = 0; m_ak = 0; ds_i = 0; ar = 0; gk = 0;
    wt = 0; al = '0; ms = '0;
    cyc(3); pwr_clr = 0; seg_clr = 0; cyc(2);
    check(!ag && !ai && !bh && !ak_o && !dk_o, "idle after clear");

    // arbitration while a master holds AS/AK; halt requested meanwhile
    as_i = 1; m_ak = 1;
    @(negedge clk); ar = 1; al = 6'd9;
    wait_for(msp, 1'b1, n);
    check(ai, "AI set by AG(u)");
    @(negedge clk); halt_sw = 1;
    cyc(10);
    check(ag && msp && !bh, "halt waits for the arbitration cycle");
    @(negedge clk); as_i = 0; m_ak = 0;
    wait_for(ag, 1'b0, n);
    cyc(3);
    check(!bh, "halt waits for MSP");
    @(negedge clk); gk = 1; ar = 0;
    cyc(1);
    check(!msp, "GK(u) ends the cycle");
    @(negedge clk); gk = 0;
    cyc(4);
    check(bh && ak_o, "halted after the cycle: BH and AK held");
    @(negedge clk); ar = 1; al = 6'd3;
    cyc(20);
    check(!ag, "no arbitration while halted");
    @(negedge clk); seg_clr = 1; cyc(1); seg_clr = 0;
    check(bh, "segment clear leaves the halt");
    @(negedge clk); halt_sw = 0; ar = 0; al = '0;
    cyc(4);
    check(!bh && !ak_o, "run releases the bus");
    wait_for(ai, 1'b0, n);
    check(!ai, "AI released after TM3");

    // segment clear aborts an arbitration cycle
    @(negedge clk); ar = 1; al = 6'd1;
    wait_for(ag, 1'b1, n);
    cyc(2);
    @(negedge clk); seg_clr = 1; cyc(1); seg_clr = 0; ar = 0;
    check(!ag && !msp && !ai, "segment clear resets AG, MSP, AI");
    cyc(3);

    // broadcast through the section's drivers
    @(negedge clk); ms = 2'd2; as_i = 1;
    wait_for(ak_o, 1'b1, n);
    check(ak_o && bc, "broadcast AK on the section's driver");
    @(negedge clk); ms = 2'd0; ds_i = 1;
    wait_for(dk_o, 1'b1, n);
    check(dk_o, "broadcast DK on the section's driver");
    @(negedge clk); ds_i = 0;
    wait_for(dk_o, 1'b0, n);
    @(negedge clk); as_i = 0;
    wait_for(ak_o, 1'b0, n);
    check(!ak_o, "broadcast AK(d)");
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
