// rb_integrator: reset-bus integration and segment clear.
//
// A FASTBUS reset (RB) is accepted only after the RB line has been held
// asserted for the integration time tRB (200..300 ns on a cable segment,
// 100..150 ns on a crate segment); shorter glitches are ignored. An accepted
// reset only acts while the segment is not halted (BH = 0), which is the
// term "integral(RB) . BH*" of the ancillary logic equations. The output
// SEG_CLR is the common clear of the ancillary logic:
//   SEG_CLR = PWR_CLR + integral(RB) . BH*
// RB_INT is the integrated reset alone.
//
// Timing: RB_INT rises T_RB cycles after RB is first sampled high and falls
// in the cycle after RB is sampled low. SEG_CLR is combinational from RB_INT,
// BH and PWR_CLR.
module rb_integrator #(
  parameter int unsigned T_RB = anc_pkg::CBL_T_RB    // integration, cycles
) (
  input  logic clk,
  input  logic pwr_clr,            // power-on clear
  input  logic rb,                 // received RB line
  input  logic bh,                 // bus halted
  output logic rb_int,             // RB held for the integration time
  output logic seg_clr             // common clear of the ancillary logic
);
  localparam int unsigned CW = (T_RB < 2) ? 1 : $clog2(T_RB + 1);

  logic [CW-1:0] cnt;

  always_ff @(posedge clk) begin
    if (pwr_clr || !rb) begin
      cnt    <= '0;
      rb_int <= 1'b0;
    end else if (cnt != CW'(T_RB - 1)) begin
      cnt    <= cnt + 1'b1;
    end else begin
      rb_int <= 1'b1;
    end
  end

  assign seg_clr = pwr_clr || (rb_int && !bh);
endmodule
