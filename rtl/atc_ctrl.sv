// atc_ctrl: Arbitration Timing Control of a FASTBUS segment.
//
// Two flip-flops, AG (arbitration grant, drives the AG line) and MSP
// (mastership pending), and three timers run one arbitration cycle:
//   1. SET AG = AR . GK* . MSP* . HALT_REQ*: a request is pending and the
//      current master has released GK. AG starts the cycle and TM1.
//   2. When TM1 has elapsed the arbitration levels AL have settled. If
//      AL = 0 (an error: no competitor asserted a level) AG is cleared and the
//      cycle is abandoned; otherwise MSP is set, marking the winner.
//   3. AG stays up until the current master has released the bus (AK = 0)
//      and the bus has settled for ATAK; then AG is cleared, which tells the
//      pending master to assert GK, and TM2 starts.
//   4. GK(u) from the new master clears MSP, re-enabling SET AG. If no GK
//      arrives within TM2, MSP is cleared by the timeout.
// Set and reset of one flip-flop at once leave it unchanged; CLR overrides.
//
// Status outputs (one-cycle pulses) report a granted cycle (GK received),
// an AL = 0 error and a TM2 timeout; they are for monitoring only.
//
// Timing: AG rises one cycle after the set condition is sampled. TM1, ATAK
// and TM2 are anc_timer intervals of T_TM1, T_ATAK and T_TM2 cycles. The
// gating of TM1 by MSP* and of ATAK by AG.MSP.AK* follows the described
// sequence; the exact gate equations are this implementation's.
module atc_ctrl #(
  parameter int unsigned AL_W   = anc_pkg::AL_W,
  parameter int unsigned T_TM1  = anc_pkg::CBL_T_TM1,
  parameter int unsigned T_ATAK = anc_pkg::CBL_T_ATAK,
  parameter int unsigned T_TM2  = anc_pkg::CBL_T_TM2
) (
  input  logic            clk,
  input  logic            clr,        // segment clear
  input  logic            ar,         // received AR (wired OR)
  input  logic            gk,         // received GK
  input  logic [AL_W-1:0] al,         // received arbitration levels
  input  logic            ak_i,       // received AK (wired OR)
  input  logic            halt_req,   // from run/halt control
  output logic            ag,         // AG line driver
  output logic            msp,        // mastership pending
  output logic            ev_grant,   // GK(u) ended a cycle
  output logic            ev_al_err,  // arbitration ended with AL = 0
  output logic            ev_tm2_to   // TM2 timeout ended a cycle
);
  logic tm1_done, atak_done, tm2_done;
  logic set_ag, res_ag, set_msp, res_msp;

  anc_timer #(.N(T_TM1)) u_tm1 (
    .clk(clk), .clr(clr), .en(ag && !msp), .done(tm1_done));

  anc_timer #(.N(T_ATAK)) u_atak (
    .clk(clk), .clr(clr), .en(ag && msp && !ak_i), .done(atak_done));

  anc_timer #(.N(T_TM2)) u_tm2 (
    .clk(clk), .clr(clr), .en(msp && !ag), .done(tm2_done));

  assign set_ag  = ar && !gk && !msp && !ag && !halt_req;
  assign res_ag  = (tm1_done && (al == '0)) || atak_done;
  assign set_msp = tm1_done && (al != '0);
  assign res_msp = !ag && (gk || tm2_done);

  always_ff @(posedge clk) begin
    if (clr) begin
      ag  <= 1'b0;
      msp <= 1'b0;
    end else begin
      if (set_ag && !res_ag)       ag  <= 1'b1;
      else if (res_ag && !set_ag)  ag  <= 1'b0;
      if (set_msp && !res_msp)     msp <= 1'b1;
      else if (res_msp && !set_msp) msp <= 1'b0;
    end
  end

  assign ev_grant  = !clr && msp && !ag && gk;
  assign ev_al_err = !clr && tm1_done && (al == '0);
  assign ev_tm2_to = !clr && msp && !ag && !gk && tm2_done;

  // MSP is only ever set while AG is up.
  a_msp_with_ag: assert property (@(posedge clk) disable iff (clr)
    $rose(msp) |-> $past(ag));
endmodule
