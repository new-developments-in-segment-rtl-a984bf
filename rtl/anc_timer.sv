// anc_timer: interval timer of the ancillary logic.
//
// Follows the timer convention used throughout the FASTBUS ancillary logic:
// the timer runs while EN is asserted and asserts DONE at the end of its
// interval; DONE then stays asserted as long as EN stays asserted. Dropping
// EN, or asserting CLR, resets and re-initialises the timer (CLR wins).
//
// Timing: with EN rising before clock edge 0, DONE is high after edge N-1,
// i.e. N clock cycles after EN was first sampled. N = 0 gives DONE = EN
// combinationally delayed by nothing (DONE = EN & ~CLR).
module anc_timer #(
  parameter int unsigned N = 4     // interval in clock cycles
) (
  input  logic clk,
  input  logic clr,                // synchronous clear, overrides EN
  input  logic en,                 // level enable
  output logic done                // interval elapsed while EN held
);
  localparam int unsigned CW = (N < 2) ? 1 : $clog2(N + 1);

  logic [CW-1:0] cnt;

  always_ff @(posedge clk) begin
    if (clr || !en)
      cnt <= '0;
    else if (cnt != CW'(N))
      cnt <= cnt + 1'b1;
  end

  assign done = en && !clr && (cnt == CW'(N));
endmodule
