// power_on_clear: generator of the PWR CLR signal of the ancillary logic.
//
// PWR CLR clears the arbitration, EG, CSR and handshake state of the segment
// ancillary logic after power-up. Its length is left to the designer; here
// PWR CLR is asserted while the asynchronous power-good input POR_N is low
// and for T_PWR further clock cycles after it rises. POR_N is passed through
// a two-stage synchroniser, so the release of PWR CLR is synchronous to CLK.
// The pulse length T_PWR is this implementation's choice.
module power_on_clear #(
  parameter int unsigned T_PWR = anc_pkg::T_PWR_CLR   // cycles after POR_N(u)
) (
  input  logic clk,
  input  logic por_n,              // asynchronous power good, low = power down
  output logic pwr_clr             // power-on clear, synchronous release
);
  localparam int unsigned CW = (T_PWR < 2) ? 1 : $clog2(T_PWR + 1);

  logic [1:0]    sync;
  logic [CW-1:0] cnt;

  always_ff @(posedge clk or negedge por_n) begin
    if (!por_n) begin
      sync    <= 2'b00;
      cnt     <= '0;
      pwr_clr <= 1'b1;
    end else begin
      sync <= {sync[0], 1'b1};
      if (!sync[1]) begin
        cnt     <= '0;
        pwr_clr <= 1'b1;
      end else if (cnt != CW'(T_PWR)) begin
        cnt     <= cnt + 1'b1;
        pwr_clr <= 1'b1;
      end else begin
        pwr_clr <= 1'b0;
      end
    end
  end
endmodule
