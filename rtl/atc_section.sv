// atc_section: Arbitration Timing Control section of the ancillary logic.
//
// Groups the four functions that share the arbitration and handshake lines:
// run/halt control (run_halt), arbitration timing (atc_ctrl), arbitration
// inhibit (arb_inhibit) and the broadcast system handshake (sys_handshake).
// On a crate segment this section is one board; on the cable segment module
// it shares a board with the GAC section (gac_section).
//
// Internal wiring: AG and MSP feed the run/halt logic, which only halts the
// bus between arbitration cycles; its HALT_REQ blocks SET AG; AG(u) sets AI.
// The AK driver is the OR of the halt hold and the broadcast AK.
//
// Clears: run/halt by PWR_CLR only (an RB reset is ignored while halted);
// everything else by SEG_CLR = PWR_CLR + integral(RB).BH*, formed outside.
// Timing: see the submodules; all counts are cycles of CLK.
module atc_section #(
  parameter int unsigned T_ATAK      = anc_pkg::CBL_T_ATAK,
  parameter int unsigned T_TM1       = anc_pkg::CBL_T_TM1,
  parameter int unsigned T_TM2       = anc_pkg::CBL_T_TM2,
  parameter int unsigned T_TM3       = anc_pkg::CBL_T_TM3,
  parameter int unsigned T_TM4       = anc_pkg::CBL_T_TM4,
  parameter int unsigned T_DTA       = anc_pkg::CBL_T_DTA,
  parameter int unsigned T_DTD       = anc_pkg::CBL_T_DTD,
  parameter bit          FAST_DK_RST = 1'b0,
  parameter int unsigned MS_W        = 2
) (
  input  logic                     clk,
  input  logic                     pwr_clr,     // power-on clear
  input  logic                     seg_clr,     // PWR CLR + integral(RB).BH*
  input  logic                     halt_sw,     // run/halt switch, 1 = HALT
  input  logic                     as_i,        // received AS
  input  logic                     ak_i,        // received AK (wired OR)
  input  logic                     ds_i,        // received DS
  input  logic                     ar_i,        // received AR (wired OR)
  input  logic                     gk_i,        // received GK
  input  logic [anc_pkg::AL_W-1:0] al_i,        // received AL (wired OR)
  input  logic                     wt_i,        // received WT (wired OR)
  input  logic [MS_W-1:0]          ms_i,        // received MS lines
  output logic                     ag_o,        // AG driver
  output logic                     ai_o,        // AI driver
  output logic                     bh_o,        // BH driver
  output logic                     ak_o,        // AK driver (halt hold, broadcast)
  output logic                     dk_o,        // DK driver (broadcast)
  output logic                     msp,         // mastership pending
  output logic                     bc,          // broadcast in progress
  output logic                     ev_grant,    // pulse: GK(u) ended a cycle
  output logic                     ev_al_err,   // pulse: AL = 0 at the end of TM1
  output logic                     ev_tm2_to,   // pulse: TM2 timeout
  output logic                     ev_wt_hold,  // broadcast acknowledgement held by WT
  output logic                     ev_fast_rst  // pulse: broadcast DK fast reset
);
  logic halt_req;
  logic rh_ak, shl_ak;

  run_halt u_rh (
    .clk(clk), .pwr_clr(pwr_clr), .halt_sw(halt_sw),
    .ag(ag_o), .msp(msp), .as_i(as_i), .ak_i(ak_i),
    .halt_req(halt_req), .bh(bh_o), .ak_drv(rh_ak));

  atc_ctrl #(.T_TM1(T_TM1), .T_ATAK(T_ATAK), .T_TM2(T_TM2)) u_atc (
    .clk(clk), .clr(seg_clr), .ar(ar_i), .gk(gk_i), .al(al_i),
    .ak_i(ak_i), .halt_req(halt_req), .ag(ag_o), .msp(msp),
    .ev_grant(ev_grant), .ev_al_err(ev_al_err), .ev_tm2_to(ev_tm2_to));

  arb_inhibit #(.T_TM3(T_TM3)) u_ai (
    .clk(clk), .clr(seg_clr), .ag(ag_o), .ar(ar_i), .ai(ai_o));

  sys_handshake #(.T_DTA(T_DTA), .T_DTD(T_DTD), .T_TM4(T_TM4),
                  .FAST_DK_RST(FAST_DK_RST), .MS_W(MS_W)) u_shl (
    .clk(clk), .clr(seg_clr), .as_i(as_i), .ds_i(ds_i), .ms_i(ms_i),
    .wt_i(wt_i), .ak_drv(shl_ak), .dk_drv(dk_o), .bc(bc),
    .ev_wt_hold(ev_wt_hold), .ev_fast_rst(ev_fast_rst));

  assign ak_o = rh_ak | shl_ak;
endmodule
