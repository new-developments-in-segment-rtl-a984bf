// tb_anc_timing: timing-table check of the ancillary logic for both segment
// types.
//
// Two complete units run side by side on the same stimulus: instance 0 with
// the default (15 m cable segment) cycle counts, instance 1 with the 19-inch
// crate segment counts of anc_pkg. Every delay of the ancillary logic timing
// table is measured in nanoseconds from the bus transitions and compared with
// that segment type's MIN/MAX window:
//   ATAK, TM1, TM2, TM3, TM4 (minimum), dTA and dTD on both edges (window),
//   RB integration (window, and a too-short pulse ignored), EG delay dTAS
//   and the slave's DS(u)->DK(u) (maximum).
// The crate instance also uses MS<2> and a 12-bit GP, as a crate unit does;
// an address cycle with MS<2> set must select nothing there, while the cable
// unit, which does not receive MS<2>, sees MS<1:0> only.
// The stimulus waits long enough for the slower (cable) unit between steps.
module tb_anc_timing;
  import anc_pkg::*;
  logic clk = 1'b0;
  always #(CLK_NS / 2) clk = ~clk;

  // windows in ns: index 0 = cable, 1 = crate
  localparam int ATAK_MIN[2] = '{130, 40};
  localparam int TM1_MIN[2]  = '{440, 120};
  localparam int TM2_MIN[2]  = '{830, 650};
  localparam int TM3_MIN[2]  = '{180, 30};
  localparam int TM4_MIN[2]  = '{180, 30};
  localparam int DTA_MIN[2]  = '{680, 500};
  localparam int DTA_MAX[2]  = '{730, 550};
  localparam int DTD_MIN[2]  = '{2180, 2000};
  localparam int DTD_MAX[2]  = '{2380, 2200};
  localparam int RB_MIN[2]   = '{200, 100};
  localparam int RB_MAX[2]   = '{300, 150};
  localparam int DTAS_MAX    = 60;
  localparam int DK_MAX      = 1000;
  // cycle counts per instance
  localparam int unsigned C_ATAK[2] = '{CBL_T_ATAK, CRT_T_ATAK};
  localparam int unsigned C_TM1[2]  = '{CBL_T_TM1,  CRT_T_TM1};
  localparam int unsigned C_TM2[2]  = '{CBL_T_TM2,  CRT_T_TM2};
  localparam int unsigned C_TM3[2]  = '{CBL_T_TM3,  CRT_T_TM3};
  localparam int unsigned C_TM4[2]  = '{CBL_T_TM4,  CRT_T_TM4};
  localparam int unsigned C_DTA[2]  = '{CBL_T_DTA,  CRT_T_DTA};
  localparam int unsigned C_DTD[2]  = '{CBL_T_DTD,  CRT_T_DTD};
  localparam int unsigned C_RB[2]   = '{CBL_T_RB,   CRT_T_RB};
  localparam int unsigned C_MSW[2]  = '{2, 3};
  localparam int unsigned C_GPW[2]  = '{8, 12};

  logic por_n, halt_sw;
  logic m_as, m_ds, m_ak, m_dk, m_ar, m_gk, m_wt, m_rb, m_rd;
  logic [AL_W-1:0] m_al;
  logic [1:0] m_ms;
  logic m_ms2;
  logic [2:0] ms3;
  assign ms3 = {m_ms2, m_ms};
  logic [31:0] m_ad;

  logic ag[2], ai[2], eg[2], ak_o[2], dk_o[2], msp[2], rb_int[2];
  logic ak_bus[2], dk_bus[2];
  realtime t_ag_u[2], t_ag_d[2], t_msp_u[2], t_msp_d[2], t_ai_d[2];
  realtime t_ak_u[2], t_ak_d[2], t_dk_u[2], t_dk_d[2], t_eg_u[2], t_rb_u[2];
  int n_rb_int[2];

  int checks = 0, failures = 0;

  for (genvar i = 0; i < 2; i++) begin : g_unit
    logic bh, ad_oe, pwr_clr, seg_clr, bc, ega, sel;
    logic ev_grant, ev_al_err, ev_tm2_to, ev_wt_hold, ev_fast_rst;
    logic [2:0] ss;
    logic [31:0] ad_o, ad_bus;
    logic [C_GPW[i]-1:0] gp;
    logic [C_MSW[i]-1:0] ms_loc;
    assign ms_loc = ms3[C_MSW[i]-1:0];
    assign ak_bus[i] = m_ak | ak_o[i];
    assign dk_bus[i] = m_dk | dk_o[i];
    assign ad_bus    = m_ad | (ad_oe ? ad_o : 32'h0);

    anc_cable_segment #(
      .T_ATAK(C_ATAK[i]), .T_TM1(C_TM1[i]), .T_TM2(C_TM2[i]), .T_TM3(C_TM3[i]),
      .T_TM4(C_TM4[i]), .T_DTA(C_DTA[i]), .T_DTD(C_DTD[i]), .T_RB(C_RB[i]),
      .MS_W(C_MSW[i]), .GP_W(C_GPW[i])
    ) u (
      .clk(clk), .por_n(por_n), .halt_sw(halt_sw),
      .as_i(m_as), .ak_i(ak_bus[i]), .ds_i(m_ds), .dk_i(dk_bus[i]), .ar_i(m_ar), .gk_i(m_gk),
      .al_i(m_al), .wt_i(m_wt), .rb_i(m_rb), .ms_i(ms_loc), .rd_i(m_rd), .ad_i(ad_bus),
      .ag_o(ag[i]), .ai_o(ai[i]), .bh_o(bh), .eg_o(eg[i]), .ak_o(ak_o[i]), .dk_o(dk_o[i]),
      .ss_o(ss), .ad_o(ad_o), .ad_oe(ad_oe), .pwr_clr(pwr_clr), .seg_clr(seg_clr),
      .rb_int(rb_int[i]), .msp(msp[i]), .bc(bc), .ega(ega), .gac_sel(sel), .gp(gp),
      .ev_grant(ev_grant), .ev_al_err(ev_al_err), .ev_tm2_to(ev_tm2_to),
      .ev_wt_hold(ev_wt_hold), .ev_fast_rst(ev_fast_rst));

    always @(posedge ag[i])     t_ag_u[i]  = $realtime;
    always @(negedge ag[i])     t_ag_d[i]  = $realtime;
    always @(posedge msp[i])    t_msp_u[i] = $realtime;
    always @(negedge msp[i])    t_msp_d[i] = $realtime;
    always @(negedge ai[i])     t_ai_d[i]  = $realtime;
    always @(posedge ak_o[i])   t_ak_u[i]  = $realtime;
    always @(negedge ak_o[i])   t_ak_d[i]  = $realtime;
    always @(posedge dk_o[i])   t_dk_u[i]  = $realtime;
    always @(negedge dk_o[i])   t_dk_d[i]  = $realtime;
    always @(posedge eg[i])     t_eg_u[i]  = $realtime;
    always @(posedge rb_int[i]) begin t_rb_u[i] = $realtime; n_rb_int[i]++; end
  end

  task automatic check(input bit cond, input string msg);
    checks++;
    if (!cond) begin failures++; $display("FAIL %s at %0t", msg, $time); end
  endtask

  task automatic check_win(input string what, input int i, input realtime d,
                           input int lo, input int hi);
    check(d >= lo && d <= hi,
          $sformatf("%s %s = %0.0f ns, window %0d..%0d", (i != 0) ? "crate" : "cable", what, d, lo, hi));
  endtask

  task automatic step(output realtime t);
    @(negedge clk);
    t = $realtime;
  endtask

  initial begin
    realtime t0;
    por_n = 1'b1; #1;   // give the asynchronous power-down a falling edge
    por_n = 1'b0; halt_sw = 1'b0;
    m_as = 0; m_ds = 0; m_ak = 0; m_dk = 0; m_ar = 0; m_gk = 0; m_wt = 0; m_rb = 0; m_rd = 0;
    m_al = '0; m_ms = '0; m_ms2 = 1'b0; m_ad = '0;
    n_rb_int = '{0, 0};
    #100 por_n = 1'b1;
    #1000;

    // ---- arbitration while a master holds the AS/AK lock
    m_ak = 1'b1;
    step(t0); m_ar = 1'b1; m_al = 6'd5;
    #3000;
    for (int i = 0; i < 2; i++) begin
      check(ag[i] && msp[i], "AG and MSP up while the bus is locked");
      check_win("TM1", i, t_msp_u[i] - t_ag_u[i], TM1_MIN[i], TM1_MIN[i] + 30);
    end
    step(t0); m_ak = 1'b0; m_ar = 1'b0; m_al = '0;
    #3000;
    for (int i = 0; i < 2; i++) begin
      check_win("ATAK", i, t_ag_d[i] - t0, ATAK_MIN[i], ATAK_MIN[i] + 30);
      check_win("TM3", i, t_ai_d[i] - t0, TM3_MIN[i], TM3_MIN[i] + 30);
      check(!msp[i], "MSP cleared without GK");
      check_win("TM2", i, t_msp_d[i] - t_ag_d[i], TM2_MIN[i], TM2_MIN[i] + 30);
    end

    // ---- broadcast held by WT, then data both ways, then AS(d)
    m_wt = 1'b1;
    step(t0); m_ms = 2'd2; m_as = 1'b1;
    #3000;
    check(!ak_o[0] && !ak_o[1], "broadcast AK held by WT");
    step(t0); m_wt = 1'b0;
    #1000;
    for (int i = 0; i < 2; i++)
      check_win("TM4 (WT(d) to AK(u))", i, t_ak_u[i] - t0, TM4_MIN[i], TM4_MIN[i] + 30);
    step(t0); m_ms = 2'd0; m_ds = 1'b1;
    #4000;
    for (int i = 0; i < 2; i++) check_win("dTD on DS(u)", i, t_dk_u[i] - t0, DTD_MIN[i], DTD_MAX[i]);
    step(t0); m_ds = 1'b0;
    #4000;
    for (int i = 0; i < 2; i++) check_win("dTD on DS(d)", i, t_dk_d[i] - t0, DTD_MIN[i], DTD_MAX[i]);
    step(t0); m_as = 1'b0;
    #2000;
    for (int i = 0; i < 2; i++) check_win("dTA on AS(d)", i, t_ak_d[i] - t0, DTA_MIN[i], DTA_MAX[i]);
    step(t0); m_ms = 2'd3; m_as = 1'b1;
    #2000;
    for (int i = 0; i < 2; i++) check_win("dTA on AS(u)", i, t_ak_u[i] - t0, DTA_MIN[i], DTA_MAX[i]);
    m_as = 1'b0;
    #2000;

    // ---- geographical address: EG delay
    m_ad = 32'h0000_0003; m_ms = 2'd0;
    step(t0); m_as = 1'b1;
    #500;
    for (int i = 0; i < 2; i++) check_win("EG delay", i, t_eg_u[i] - t0, 0, DTAS_MAX);
    m_as = 1'b0; m_ad = '0;
    #500;

    // ---- own slave: DS(u) to DK(u)
    m_ad = 32'h0000_00FF; m_ms = 2'd1;
    @(negedge clk); m_as = 1'b1;
    #500; m_ad = '0; m_ms = 2'd0; m_rd = 1'b1;
    step(t0); m_ds = 1'b1;
    #1500;
    for (int i = 0; i < 2; i++) check_win("slave DK delay", i, t_dk_u[i] - t0, 0, DK_MAX);
    m_ds = 1'b0; #500; m_as = 1'b0; m_rd = 1'b0;
    #500;

    // ---- MS<2>: used by the crate unit only
    m_ad = 32'h0000_0003; m_ms = 2'd0; m_ms2 = 1'b1;    // MS = 4
    @(negedge clk); m_as = 1'b1;
    #500;
    check(eg[0] && !eg[1], "MS = 4: EG on the cable unit only");
    m_as = 1'b0;
    #500;
    m_ad = 32'h0000_00FF; m_ms = 2'd1;                  // MS = 5
    @(negedge clk); m_as = 1'b1;
    #500;
    check(ak_o[0] && !ak_o[1], "MS = 5 at 255: own slave answers on the cable unit only");
    m_as = 1'b0; m_ms2 = 1'b0; m_ad = '0;
    #500;

    // ---- RB integration
    step(t0); m_rb = 1'b1;
    #(RB_MIN[1] - 30); m_rb = 1'b0;
    #500;
    check(n_rb_int[0] == 0 && n_rb_int[1] == 0, "RB shorter than both minimums ignored");
    step(t0); m_rb = 1'b1;
    #1000; m_rb = 1'b0;
    #500;
    for (int i = 0; i < 2; i++) begin
      check(n_rb_int[i] == 1, "long RB accepted");
      check_win("RB integration", i, t_rb_u[i] - t0, RB_MIN[i], RB_MAX[i]);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
