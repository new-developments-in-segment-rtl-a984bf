// anc_cable_segment: Segment Ancillary Logic for a FASTBUS cable segment.
//
// One unit per segment supplies the functions that all devices on the
// segment need in common:
//   Arbitration Timing Control section (atc_section)
//     run_halt       manual run/halt switch, BH and the halt hold on AK
//     atc_ctrl       AG / MSP flip-flops, TM1, ATAK, TM2
//     arb_inhibit    AI flip-flop, TM3 (assured access)
//     sys_handshake  AK / DK for broadcasts, dTA, dTD, NWT timer TM4
//   Geographical Address Control section (gac_section)
//     eg_gen         EG generator (dTAS)
//     gac_slave      slave at address 255 with NTA, CSR#0 (ID), CSR#3 (GP)
//   common
//     power_on_clear PWR CLR
//     rb_integrator  integral(RB) and the segment clear PWR CLR + integral(RB).BH*
//
// Bus interface: every segment line enters as the received level (true =
// asserted), with the wired-OR of all modules, this one included, already
// formed by the line receivers; every line this unit asserts leaves as a
// separate driver output. AK and DK have several internal sources which are
// ORed here, as the wired-OR line would. The differential ECL drivers,
// receivers and active terminators of the cable are outside this RTL.
//
// Defaults are those of the 15 m cable segment module: timing of the cable
// column of the ancillary logic timing table, MS<2> not used (MS_W = 2),
// an 8-bit CSR#3 and the module ID 0014 (CSR#0 = 0014_0000 hex). The crate
// segment version differs only in parameters: the crate counts CRT_* of
// anc_pkg, GP_W = 12 and MS_W = 3.
// Clock period: anc_pkg::CLK_NS (10 ns), an implementation choice.
module anc_cable_segment #(
  parameter int unsigned GP_W        = 8,
  parameter int unsigned MS_W        = 2,
  parameter logic [15:0] MODULE_ID   = 16'h0014,
  parameter int unsigned T_ATAK      = anc_pkg::CBL_T_ATAK,
  parameter int unsigned T_TM1       = anc_pkg::CBL_T_TM1,
  parameter int unsigned T_TM2       = anc_pkg::CBL_T_TM2,
  parameter int unsigned T_TM3       = anc_pkg::CBL_T_TM3,
  parameter int unsigned T_TM4       = anc_pkg::CBL_T_TM4,
  parameter int unsigned T_DTA       = anc_pkg::CBL_T_DTA,
  parameter int unsigned T_DTD       = anc_pkg::CBL_T_DTD,
  parameter int unsigned T_RB        = anc_pkg::CBL_T_RB,
  parameter int unsigned T_DTAS      = anc_pkg::T_DTAS,
  parameter int unsigned T_DTDS      = anc_pkg::T_DTDS,
  parameter int unsigned T_DTDK      = anc_pkg::T_DTDK,
  parameter int unsigned T_PWR       = anc_pkg::T_PWR_CLR,
  parameter bit          FAST_DK_RST = 1'b0
) (
  input  logic                     clk,         // clock, anc_pkg::CLK_NS period
  input  logic                     por_n,       // power good
  input  logic                     halt_sw,     // run/halt switch, 1 = HALT
  // received segment lines
  input  logic                     as_i,        // received AS, address strobe
  input  logic                     ak_i,        // received AK, address acknowledge (wired OR)
  input  logic                     ds_i,        // received DS, data strobe
  input  logic                     dk_i,        // received DK, data acknowledge (wired OR)
  input  logic                     ar_i,        // received AR, arbitration request (wired OR)
  input  logic                     gk_i,        // received GK, grant acknowledge
  input  logic [anc_pkg::AL_W-1:0] al_i,        // received AL, arbitration levels (wired OR)
  input  logic                     wt_i,        // received WT, wait (wired OR)
  input  logic                     rb_i,        // received RB, reset bus
  input  logic [MS_W-1:0]          ms_i,        // received MS lines, mode select
  input  logic                     rd_i,        // received RD, 1 = read
  input  logic [31:0]              ad_i,        // received AD<31:0>, address/data
  // line drivers
  output logic                     ag_o,        // AG driver, arbitration grant
  output logic                     ai_o,        // AI driver, arbitration inhibit
  output logic                     bh_o,        // BH driver, bus halted
  output logic                     eg_o,        // EG driver, enable geographical
  output logic                     ak_o,        // AK driver (halt hold, broadcast, own slave)
  output logic                     dk_o,        // DK driver (broadcast, own slave)
  output logic [2:0]               ss_o,        // SS<2:0> drivers, status of own slave
  output logic [31:0]              ad_o,        // AD drivers, read data of own slave
  output logic                     ad_oe,       // AD drivers enabled
  // monitoring
  output logic                     pwr_clr,     // power-on clear
  output logic                     seg_clr,     // segment clear PWR CLR + integral(RB).BH*
  output logic                     rb_int,      // RB held for the integration time
  output logic                     msp,         // mastership pending
  output logic                     bc,          // broadcast in progress
  output logic                     ega,         // current address is geographical
  output logic                     gac_sel,     // own slave selected
  output logic [GP_W-1:0]          gp,          // CSR#3, segment base address GP
  output logic                     ev_grant,    // pulse: GK(u) ended an arbitration cycle
  output logic                     ev_al_err,   // pulse: arbitration ended with AL = 0
  output logic                     ev_tm2_to,   // pulse: TM2 GK timeout
  output logic                     ev_wt_hold,  // broadcast acknowledgement held by WT
  output logic                     ev_fast_rst  // pulse: broadcast DK fast reset
);
  logic atc_ak, atc_dk, gac_ak, gac_dk;

  power_on_clear #(.T_PWR(T_PWR)) u_por (
    .clk(clk), .por_n(por_n), .pwr_clr(pwr_clr));

  rb_integrator #(.T_RB(T_RB)) u_rb (
    .clk(clk), .pwr_clr(pwr_clr), .rb(rb_i), .bh(bh_o),
    .rb_int(rb_int), .seg_clr(seg_clr));

  // ---- Arbitration Timing Control section ------------------------------
  atc_section #(.T_ATAK(T_ATAK), .T_TM1(T_TM1), .T_TM2(T_TM2), .T_TM3(T_TM3),
                .T_TM4(T_TM4), .T_DTA(T_DTA), .T_DTD(T_DTD),
                .FAST_DK_RST(FAST_DK_RST), .MS_W(MS_W)) u_atc (
    .clk(clk), .pwr_clr(pwr_clr), .seg_clr(seg_clr), .halt_sw(halt_sw),
    .as_i(as_i), .ak_i(ak_i), .ds_i(ds_i), .ar_i(ar_i), .gk_i(gk_i),
    .al_i(al_i), .wt_i(wt_i), .ms_i(ms_i),
    .ag_o(ag_o), .ai_o(ai_o), .bh_o(bh_o), .ak_o(atc_ak), .dk_o(atc_dk),
    .msp(msp), .bc(bc), .ev_grant(ev_grant), .ev_al_err(ev_al_err),
    .ev_tm2_to(ev_tm2_to), .ev_wt_hold(ev_wt_hold), .ev_fast_rst(ev_fast_rst));

  // ---- Geographical Address Control section ----------------------------
  gac_section #(.GP_W(GP_W), .MS_W(MS_W), .MODULE_ID(MODULE_ID), .T_DTAS(T_DTAS),
                .T_DTDS(T_DTDS), .T_DTDK(T_DTDK)) u_gac (
    .clk(clk), .seg_clr(seg_clr), .as_i(as_i), .ak_i(ak_i), .ds_i(ds_i),
    .dk_i(dk_i), .ms_i(ms_i), .rd_i(rd_i), .ad_i(ad_i),
    .eg_o(eg_o), .ak_o(gac_ak), .dk_o(gac_dk), .ss_o(ss_o), .ad_o(ad_o),
    .ad_oe(ad_oe), .ega(ega), .sel(gac_sel), .gp(gp));

  assign ak_o = atc_ak | gac_ak;
  assign dk_o = atc_dk | gac_dk;
endmodule
