// sys_handshake: System Handshake Logic (SHL) for broadcast operations.
//
// In a broadcast no single slave answers, so the ancillary logic of every
// addressed segment generates AK and DK on behalf of all its slaves:
//   * An address cycle whose MS code is a broadcast code (2 or 3) at AS(u)
//     opens a broadcast (BC). AK then follows AS, each transition delayed by
//     dTA so that the slowest slave has latched the broadcast address.
//   * While the broadcast is open, DK follows DS, each transition delayed by
//     dTD so that the slowest slave has taken the data.
//   * Every AK/DK transition also waits for the NWT timer TM4: WT must have
//     been deasserted for two bus delays. A segment interconnect that passes
//     the broadcast on to further segments holds WT, so acknowledgements are
//     returned only when the end of the branch has answered.
//   * Optional fast reset (FAST_DK_RST = 1): for a data cycle that is not a
//     block transfer (MS /= 1 at DS(u)), DK drops as soon as DS drops,
//     without the dTD delay and without NWT. Off by default, as it is not
//     mandatory.
// The broadcast closes once AS and AK are both down. MS has MS_W lines (2
// when MS<2> is not received; a missing MS<2> counts as 0).
//
// Timing: a transition of AS (DS) is acknowledged max(T_DTA, wait for
// T_TM4 cycles of WT = 0) cycles (T_DTD for DS) after it is sampled, plus
// up to two register stages; every delay restarts after the previous
// transition of AK (DK). Monitoring outputs pulse for one cycle.
module sys_handshake #(
  parameter int unsigned T_DTA       = anc_pkg::CBL_T_DTA,
  parameter int unsigned T_DTD       = anc_pkg::CBL_T_DTD,
  parameter int unsigned T_TM4       = anc_pkg::CBL_T_TM4,
  parameter bit          FAST_DK_RST = 1'b0,
  parameter int unsigned MS_W        = 2     // MS lines used (2 or 3)
) (
  input  logic       clk,
  input  logic       clr,         // segment clear
  input  logic       as_i,        // received AS
  input  logic       ds_i,        // received DS
  input  logic [MS_W-1:0] ms_i,  // received MS lines
  input  logic       wt_i,        // received WT (wired OR)
  output logic       ak_drv,      // AK line driver
  output logic       dk_drv,      // DK line driver
  output logic       bc,          // broadcast in progress
  output logic       ev_wt_hold,  // a due transition is being held by WT
  output logic       ev_fast_rst  // DK released by the fast reset
);
  import anc_pkg::*;

  logic as_q;
  logic [2:0] ms;
  logic lblk;                      // data cycle is a block transfer
  logic nwt_done, dta_done, dtd_done;
  logic ak_due, dk_due, fast_rst;
  logic ak_q, dk_q;                // previous AK/DK: restart the delay after a transition

  anc_timer #(.N(T_TM4)) u_tm4 (
    .clk(clk), .clr(clr), .en(!wt_i), .done(nwt_done));

  anc_timer #(.N(T_DTA)) u_dta (
    .clk(clk), .clr(clr), .en(bc && (as_i != ak_drv) && (ak_q == ak_drv)), .done(dta_done));

  anc_timer #(.N(T_DTD)) u_dtd (
    .clk(clk), .clr(clr), .en(bc && ak_drv && (ds_i != dk_drv) && (dk_q == dk_drv)), .done(dtd_done));

  assign ms = 3'(ms_i);
  assign ak_due   = dta_done && nwt_done;
  assign dk_due   = dtd_done && nwt_done;
  assign fast_rst = FAST_DK_RST && bc && dk_drv && !ds_i && !lblk;

  always_ff @(posedge clk) begin
    if (clr) begin
      as_q   <= 1'b0;
      ak_q   <= 1'b0;
      dk_q   <= 1'b0;
      bc     <= 1'b0;
      lblk   <= 1'b0;
      ak_drv <= 1'b0;
      dk_drv <= 1'b0;
    end else begin
      as_q <= as_i;
      ak_q <= ak_drv;
      dk_q <= dk_drv;
      if (as_i && !as_q && (ms == MS_2 || ms == MS_3))
        bc <= 1'b1;
      else if (!as_i && !ak_drv)
        bc <= 1'b0;

      if (ds_i && !dk_drv)
        lblk <= (ms == MS_1);

      if (ak_due)
        ak_drv <= as_i;

      if (!bc || (!as_i && !ak_drv))
        dk_drv <= 1'b0;
      else if (fast_rst)
        dk_drv <= 1'b0;
      else if (dk_due)
        dk_drv <= ds_i;
    end
  end

  assign ev_wt_hold  = (dta_done || dtd_done) && !nwt_done;
  assign ev_fast_rst = fast_rst && !clr;

  // DK is only acknowledged inside an open broadcast.
  a_dk_in_bc: assert property (@(posedge clk) disable iff (clr)
    dk_drv |-> bc);
endmodule
