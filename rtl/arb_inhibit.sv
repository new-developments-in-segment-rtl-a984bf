// arb_inhibit: Arbitration Inhibit (AI) flip-flop with timer TM3.
//
// AI is set by the rising edge of AG at the start of an arbitration cycle.
// While AI is asserted, masters that follow the assured-access protocol issue
// no new arbitration requests (AR), so every request pending at the start of
// the cycle is served before any master may request again. AI is cleared
// only after AR has been deasserted continuously for TM3 (two bus delays),
// which re-enables a new set of requests. A simultaneous set and reset leaves
// AI unchanged; CLR overrides both.
//
// Timing: AI is registered, high in the cycle after AG is first seen high.
// It falls T_TM3 + 1 cycles after AR is first sampled low (TM3 plus the
// flip-flop), so AR has been 0 for at least TM3.
module arb_inhibit #(
  parameter int unsigned T_TM3 = anc_pkg::CBL_T_TM3   // AR = 0 time, cycles
) (
  input  logic clk,
  input  logic clr,                // segment clear
  input  logic ag,                 // arbitration grant flip-flop
  input  logic ar,                 // received AR (wired OR)
  output logic ai                  // AI line driver
);
  logic ag_q;
  logic tm3_done;
  logic set_ai, res_ai;

  anc_timer #(.N(T_TM3)) u_tm3 (
    .clk (clk),
    .clr (clr),
    .en  (ai && !ar),
    .done(tm3_done)
  );

  assign set_ai = ag && !ag_q;
  assign res_ai = tm3_done;

  always_ff @(posedge clk) begin
    if (clr) begin
      ag_q <= 1'b0;
      ai   <= 1'b0;
    end else begin
      ag_q <= ag;
      if (set_ai && !res_ai)
        ai <= 1'b1;
      else if (res_ai && !set_ai)
        ai <= 1'b0;
    end
  end
endmodule
