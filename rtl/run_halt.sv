// run_halt: run/halt control of a FASTBUS segment.
//
// Watches the manual run/halt switch of the segment. A halt request
// (HALT_SW = 1) immediately raises HALT_REQ, which blocks the start of new
// arbitration cycles in the arbitration timing control. Once the arbitration
// cycle in progress has completed (AG = 0 and MSP = 0) and the current master
// has released the bus (AS = 0 and AK = 0 on the bus), the BH flip-flop is
// set: the ancillary logic then asserts the Bus Halted line BH and holds AK
// asserted, so that no master can use the segment. Returning the switch to
// RUN releases BH and AK in the next cycle.
//
// The switch is assumed debounced; it passes through a two-stage
// synchroniser here (two cycles of latency). The flip-flop form
//   SET BH = HALT_REQ . AG* . MSP* . AS* . AK*,  RES BH = HALT_REQ*
// is this implementation's reading of the run-halt description.
module run_halt (
  input  logic clk,
  input  logic pwr_clr,            // power-on clear
  input  logic halt_sw,            // manual switch, 1 = HALT
  input  logic ag,                 // arbitration grant flip-flop
  input  logic msp,                // mastership pending flip-flop
  input  logic as_i,               // received AS
  input  logic ak_i,               // received AK (wired OR of all drivers)
  output logic halt_req,           // inhibits new arbitration cycles
  output logic bh,                 // Bus Halted line driver
  output logic ak_drv              // AK line driver (holds the bus while halted)
);
  logic [1:0] sync;

  always_ff @(posedge clk) begin
    if (pwr_clr) begin
      sync <= 2'b00;
      bh   <= 1'b0;
    end else begin
      sync <= {sync[0], halt_sw};
      if (!sync[1])
        bh <= 1'b0;
      else if (!ag && !msp && !as_i && !ak_i)
        bh <= 1'b1;
    end
  end

  assign halt_req = sync[1];
  assign ak_drv   = bh;
endmodule
