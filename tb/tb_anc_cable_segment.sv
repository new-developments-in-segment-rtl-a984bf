// tb_anc_cable_segment: end-to-end test of the cable segment ancillary logic
// at its default (cable segment) parameters.
//
// The testbench plays the rest of the segment: bus masters that arbitrate and
// run address and data cycles, a slave that answers geographical addresses
// on EG, a segment interconnect that holds WT during a broadcast, the run/halt
// switch and the RB line. Bus lines are wired-OR of the testbench's drivers
// and the unit's drivers. Scenario:
//   1. power-on clear;
//   2. masters A (level 5) and B (level 3) request together: AG, AI, MSP,
//      ATAK and grant to A; A accesses the unit's own slave (CSR#0 ID read,
//      NTA and CSR#3 write of GP, a rejected write), while B's arbitration
//      waits for A's AS/AK lock to end; B is granted, AI drops after TM3;
//   3. B runs a broadcast with WT held by a segment interconnect;
//   4. a geographical address cycle in global format (new GP) raises EG;
//   5. an arbitration with AL = 0 (error) and one whose winner never takes
//      GK (TM2 timeout);
//   6. halt and run with the switch; RB ignored while halted, accepted while
//      running and clearing CSR#3.
// Every mechanism is counted and must have happened at least once.
module tb_anc_cable_segment;
  import anc_pkg::*;
  logic clk = 1'b0;
  always #(CLK_NS / 2) clk = ~clk;

  // testbench drivers
  logic por_n, halt_sw;
  logic m_as, m_ds, m_ak, m_dk, m_ar, m_gk, m_wt, m_rb, m_rd;
  logic [AL_W-1:0] m_al;
  logic [1:0] m_ms;
  logic [31:0] m_ad;
  // unit drivers
  logic ag, ai, bh, eg, ak_o, dk_o, ad_oe;
  logic [2:0] ss;
  logic [31:0] ad_o;
  logic pwr_clr, seg_clr, rb_int, msp, bc, ega, gac_sel;
  logic [7:0] gp;
  logic ev_grant, ev_al_err, ev_tm2_to, ev_wt_hold, ev_fast_rst;
  // bus lines
  logic ak_bus, dk_bus;
  logic [31:0] ad_bus;
  assign ak_bus = m_ak | ak_o;
  assign dk_bus = m_dk | dk_o;
  assign ad_bus = m_ad | (ad_oe ? ad_o : 32'h0);

  anc_cable_segment dut (
    .clk(clk), .por_n(por_n), .halt_sw(halt_sw),
    .as_i(m_as), .ak_i(ak_bus), .ds_i(m_ds), .dk_i(dk_bus), .ar_i(m_ar), .gk_i(m_gk),
    .al_i(m_al), .wt_i(m_wt), .rb_i(m_rb), .ms_i(m_ms), .rd_i(m_rd), .ad_i(ad_bus),
    .ag_o(ag), .ai_o(ai), .bh_o(bh), .eg_o(eg), .ak_o(ak_o), .dk_o(dk_o), .ss_o(ss),
    .ad_o(ad_o), .ad_oe(ad_oe), .pwr_clr(pwr_clr), .seg_clr(seg_clr), .rb_int(rb_int),
    .msp(msp), .bc(bc), .ega(ega), .gac_sel(gac_sel), .gp(gp),
    .ev_grant(ev_grant), .ev_al_err(ev_al_err), .ev_tm2_to(ev_tm2_to),
    .ev_wt_hold(ev_wt_hold), .ev_fast_rst(ev_fast_rst));

  int checks = 0, failures = 0;
  // mechanism counters
  int n_pwr = 0, n_grant = 0, n_al_err = 0, n_tm2 = 0, n_wt_hold = 0;
  int n_ai_set = 0, n_ai_clr = 0, n_ag_wait = 0, n_bh = 0, n_bc_ak = 0, n_bc_dk = 0;
  int n_eg = 0, n_sel = 0, n_ss_err = 0, n_rb = 0, n_rb_ignored = 0;
  logic ai_q = 0, bh_q = 0, eg_q = 0, sel_q = 0, pwr_q = 0;

  always @(posedge clk) begin
    ai_q <= ai; bh_q <= bh; eg_q <= eg; sel_q <= gac_sel; pwr_q <= pwr_clr;
    if (pwr_q && !pwr_clr) n_pwr++;
    if (ev_grant)   n_grant++;
    if (ev_al_err)  n_al_err++;
    if (ev_tm2_to)  n_tm2++;
    if (ev_wt_hold) n_wt_hold++;
    if (ai && !ai_q) n_ai_set++;
    if (!ai && ai_q) n_ai_clr++;
    if (bh && !bh_q) n_bh++;
    if (eg && !eg_q) n_eg++;
    if (gac_sel && !sel_q) n_sel++;
    if (ag && msp && ak_bus) n_ag_wait++;
    if (rb_int && !seg_clr) n_rb_ignored++;
    if (rb_int && seg_clr && !pwr_clr) n_rb++;
  end

  task automatic check(input bit cond, input string msg);
    checks++;
    if (!cond) begin failures++; $display("FAIL %s at %0t", msg, $time); end
  endtask

  task automatic cyc(input int n);
    repeat (n) @(posedge clk);
    #1;
  endtask

  task automatic wait_for(ref logic sig, input logic val, input int limit, output int n);
    n = 0;
    while (sig !== val && n < limit) begin @(posedge clk); #1; n++; end
  endtask

  // Primary address cycle by the current master; waits for AK.
  task automatic address(input logic [31:0] a, input logic [1:0] m, output bit got, output int n);
    @(negedge clk); m_ad = a; m_ms = m; m_rd = 1'b0; m_as = 1'b1;
    wait_for(ak_bus, 1'b1, 2000, n);
    got = ak_bus;
    @(negedge clk); m_ad = '0;
  endtask

  task automatic end_address(output int n);
    @(negedge clk); m_as = 1'b0;
    wait_for(ak_bus, 1'b0, 2000, n);
  endtask

  task automatic data(input logic [1:0] m, input bit r, input logic [31:0] w,
                      output logic [2:0] s, output logic [31:0] d, output int n);
    int k;
    @(negedge clk); m_ms = m; m_rd = r; m_ad = r ? 32'h0 : w; m_ds = 1'b1;
    wait_for(dk_bus, 1'b1, 2000, n);
    s = ss; d = ad_bus;
    @(negedge clk); m_ds = 1'b0; m_ad = '0;
    wait_for(dk_bus, 1'b0, 2000, k);
  endtask

  initial begin
    bit got; int n;
    logic [2:0] s; logic [31:0] d;
    por_n = 1'b1; #1;   // give the asynchronous power-down a falling edge
    por_n = 1'b0; halt_sw = 1'b0;
    m_as = 0; m_ds = 0; m_ak = 0; m_dk = 0; m_ar = 0; m_gk = 0; m_wt = 0; m_rb = 0; m_rd = 0;
    m_al = '0; m_ms = '0; m_ad = '0;
    cyc(5);
    check(pwr_clr, "power-on clear while power down");
    por_n = 1'b1;
    wait_for(pwr_clr, 1'b0, 100, n);
    check(!pwr_clr && !ag && !ai && !bh && !eg && !ak_o && !dk_o, "clean state after power-on");

    // ---- 2. arbitration between A (level 5) and B (level 3)
    @(negedge clk); m_ar = 1'b1; m_al = 6'd5 | 6'd3;   // wired OR during resolution
    wait_for(ag, 1'b1, 10, n);
    check(ag, "AG starts the arbitration cycle");
    cyc(2);
    check(ai, "AI asserted with AG(u)");
    m_al = 6'd5;                                        // A wins the resolution
    wait_for(msp, 1'b1, 200, n);
    check(n >= CBL_T_TM1 - 2 && n <= CBL_T_TM1, $sformatf("MSP after TM1 (got %0d)", n));
    wait_for(ag, 1'b0, 200, n);
    check(n == CBL_T_ATAK + 1, $sformatf("AG(d) ATAK after idle bus (got %0d)", n));
    // A takes GK; keeps AR up for B through the wired OR; B's level on AL
    @(negedge clk); m_gk = 1'b1; m_al = 6'd3;
    @(posedge clk); #1;
    check(!msp && n_grant == 1, "grant to A");
    // A: address the unit's slave at 255
    address(32'h0000_00FF, 2'd1, got, n);
    check(got && gac_sel, "unit slave selected");
    @(negedge clk); m_gk = 1'b0;                        // A drops GK after the lock
    // B's arbitration starts while A holds AS/AK
    wait_for(ag, 1'b1, 20, n);
    check(ag, "second arbitration during A's lock");
    data(2'd0, 1'b1, 0, s, d, n);
    check(s == SS_OK && d == 32'h0014_0000, $sformatf("CSR#0 ID word %h", d));
    check(n <= (1000 / CLK_NS), $sformatf("slave DK within 1000 ns (got %0d cycles)", n));
    data(2'd2, 1'b0, 32'h3, s, d, n);
    check(s == SS_OK, "NTA = 3");
    data(2'd0, 1'b0, 32'h0000_00A7, s, d, n);
    check(s == SS_OK && gp == 8'hA7, "CSR#3 (GP) written");
    data(2'd2, 1'b0, 32'h2, s, d, n);
    check(s == SS_ERR, "invalid NTA rejected with SS = 6");
    if (s == SS_ERR) n_ss_err++;
    check(ag && msp, "B pending while A holds the bus");
    end_address(n);
    wait_for(ag, 1'b0, 200, n);
    check(n >= CBL_T_ATAK && n <= CBL_T_ATAK + 2, $sformatf("AG(d) ATAK after AK(d) (got %0d)", n));
    @(negedge clk); m_gk = 1'b1; m_ar = 1'b0; m_al = '0;   // B takes the bus, no more requests
    @(posedge clk); #1;
    check(n_grant == 2, "grant to B");
    wait_for(ai, 1'b0, 200, n);
    check(n >= CBL_T_TM3 && n <= CBL_T_TM3 + 2, $sformatf("AI(d) TM3 after AR(d) (got %0d)", n));

    // ---- 3. B: broadcast, WT held by a segment interconnect
    // the interconnect releases WT 100 cycles into the address cycle
    @(negedge clk); m_wt = 1'b1;
    fork
      begin cyc(100); @(negedge clk); m_wt = 1'b0; end
      address(32'h0000_0000, 2'd2, got, n);
    join
    check(got, "broadcast acknowledged");
    check(n >= 100 + CBL_T_TM4, $sformatf("broadcast AK waited for WT (got %0d)", n));
    n_bc_ak++;
    m_gk = 1'b0;
    // and 300 cycles into the first data cycle
    @(negedge clk); m_wt = 1'b1;
    fork
      begin cyc(300); @(negedge clk); m_wt = 1'b0; end
      data(2'd0, 1'b0, 32'h1234_5678, s, d, n);
    join
    check(n >= 300 + CBL_T_TM4, $sformatf("broadcast DK waited for WT (got %0d)", n));
    n_bc_dk++;
    data(2'd0, 1'b0, 32'h1234_5678, s, d, n);
    check(n >= CBL_T_DTD && n <= CBL_T_DTD + 3, $sformatf("broadcast DK(u) after dTD (got %0d)", n));
    check(n * CLK_NS >= 2180 && n * CLK_NS <= 2380, "dTD inside 2180..2380 ns");
    n_bc_dk++;
    end_address(n);
    check(n * CLK_NS >= 680 && n * CLK_NS <= 730, $sformatf("AK(d) dTA inside 680..730 ns (got %0d)", n));
    cyc(3);
    check(!bc, "broadcast closed");

    // ---- 4. geographical address, global format with GP = A7
    @(negedge clk); m_ad = 32'hA700_0009; m_ms = 2'd0; m_as = 1'b1;
    wait_for(eg, 1'b1, 20, n);
    check(eg, "EG for a global geographical address");
    check(n * CLK_NS <= 60, $sformatf("EG within 60 ns (got %0d cycles)", n));
    @(negedge clk); m_ak = 1'b1;                        // slot 9 answers
    @(posedge clk); #1;
    check(!eg, "EG released at AK(u)");
    @(negedge clk); m_as = 1'b0; m_ad = '0;
    @(negedge clk); m_ak = 1'b0;
    cyc(3);
    @(negedge clk); m_ad = 32'h0000_00FF; m_ms = 2'd0; m_as = 1'b1;
    cyc(10);
    check(!eg && !ak_o, "address 255 in data space: no EG, no answer");
    @(negedge clk); m_as = 1'b0; m_ad = '0;
    cyc(3);

    // ---- 5a. arbitration with AL = 0 (error)
    @(negedge clk); m_ar = 1'b1; m_al = '0;
    wait_for(ag, 1'b1, 20, n);
    wait_for(ag, 1'b0, 200, n);
    check(!msp && n_al_err >= 1, "AL = 0 ends the cycle");
    @(negedge clk); m_ar = 1'b0;
    wait_for(ai, 1'b0, 200, n);
    // ---- 5b. winner never asserts GK: TM2 timeout
    @(negedge clk); m_ar = 1'b1; m_al = 6'd7;
    wait_for(msp, 1'b1, 200, n);
    @(negedge clk); m_ar = 1'b0;
    wait_for(ag, 1'b0, 200, n);
    wait_for(msp, 1'b0, 200, n);
    check(n >= CBL_T_TM2 && n * CLK_NS >= 830, $sformatf("TM2 timeout (got %0d)", n));
    check(n_tm2 == 1, "timeout counted");
    wait_for(ai, 1'b0, 200, n);

    // ---- 6. halt, RB while halted, run, RB while running
    @(negedge clk); halt_sw = 1'b1;
    wait_for(bh, 1'b1, 20, n);
    check(bh && ak_bus, "halted: BH and AK asserted");
    @(negedge clk); m_ar = 1'b1; m_al = 6'd2;
    cyc(50);
    check(!ag, "no arbitration while halted");
    @(negedge clk); m_ar = 1'b0; m_al = '0;
    @(negedge clk); m_rb = 1'b1; cyc(40); @(negedge clk); m_rb = 1'b0;
    check(gp == 8'hA7, "RB ignored while halted");
    @(negedge clk); halt_sw = 1'b0;
    wait_for(bh, 1'b0, 20, n);
    check(!bh && !ak_o, "run releases BH and AK");
    @(negedge clk); m_rb = 1'b1; cyc(CBL_T_RB - 5); @(negedge clk); m_rb = 1'b0;
    cyc(2);
    check(gp == 8'hA7, "short RB pulse ignored");
    @(negedge clk); m_rb = 1'b1; cyc(CBL_T_RB + 5); @(negedge clk); m_rb = 1'b0;
    cyc(2);
    check(gp == 8'h00, "RB clears CSR#3");

    // ---- mechanism coverage
    check(n_pwr >= 1,        "mechanism: power-on clear");
    check(n_grant >= 2,      "mechanism: arbitration grant");
    check(n_ag_wait >= 1,    "mechanism: AG held for the AS/AK lock");
    check(n_ai_set >= 1 && n_ai_clr >= 1, "mechanism: arbitration inhibit");
    check(n_al_err >= 1,     "mechanism: AL = 0 error");
    check(n_tm2 >= 1,        "mechanism: GK timeout");
    check(n_bc_ak >= 1,      "mechanism: broadcast AK");
    check(n_bc_dk >= 1,      "mechanism: broadcast DK");
    check(n_wt_hold >= 1,    "mechanism: WT hold");
    check(n_eg >= 1,         "mechanism: EG");
    check(n_sel >= 1,        "mechanism: unit slave selected");
    check(n_ss_err >= 1,     "mechanism: SS = 6");
    check(n_bh >= 1,         "mechanism: halt");
    check(n_rb_ignored >= 1, "mechanism: RB ignored while halted");
    check(n_rb >= 1,         "mechanism: RB reset");
    $display("mechanisms: grant=%0d al_err=%0d tm2=%0d wt_hold=%0d eg=%0d sel=%0d bh=%0d rb=%0d",
             n_grant, n_al_err, n_tm2, n_wt_hold, n_eg, n_sel, n_bh, n_rb);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
