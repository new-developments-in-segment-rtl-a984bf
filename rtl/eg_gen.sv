// eg_gen: EG generator of the Geographical Address Control section.
//
// Detects geographical address cycles and asserts the EG (enable
// geographical) line, which tells every module to compare the address with
// its slot number. Two address formats are geographical (EGA):
//   * local:  AD<31:8> = 0
//   * global: AD<31:32-GP_W> = GP (segment base address from CSR#3), the
//             remaining bits down to AD<8> zero
// and in both AD<7:0> /= FF: address 255 is reserved for the ancillary
// logic's own slave (gac_slave). Equations, with dBAS = AS delayed by dTAS:
//   SET EG = EGA . dBAS . (MS = 0 + 1) . [EG + AK + CLR]*
//   RES EG = AS* + AK + CLR
// where CLR stands for PWR CLR + integral(RB).BH*. MS has MS_W lines (2 when
// MS<2> is not received; a missing MS<2> counts as 0). EG therefore drops as
// soon as a module answers with AK, or at the end of the address cycle.
//
// Timing: EG rises T_DTAS + 1 cycles after AS(u) is sampled (dTAS is at
// most 60 ns) and falls one cycle after AS(d) or AK(u) is sampled. The
// placement of GP in the address word is this implementation's choice.
module eg_gen #(
  parameter int unsigned GP_W   = 8,                 // width of GP (CSR#3)
  parameter int unsigned MS_W   = 2,                 // MS lines used (2 or 3)
  parameter int unsigned T_DTAS = anc_pkg::T_DTAS    // address decoding delay
) (
  input  logic            clk,
  input  logic            clr,     // PWR CLR + integral(RB).BH*
  input  logic            as_i,    // received AS
  input  logic            ak_i,    // received AK (wired OR)
  input  logic [MS_W-1:0] ms_i,    // received MS lines
  input  logic [31:0]     ad_i,    // received AD<31:0>
  input  logic [GP_W-1:0] gp,      // segment base address (CSR#3)
  output logic            ega,     // address is geographical (decode)
  output logic            eg       // EG line driver
);
  import anc_pkg::*;

  logic das;
  logic [2:0] ms;
  logic set_eg, res_eg;
  logic [31:8] gp_word;

  anc_timer #(.N(T_DTAS)) u_dtas (
    .clk(clk), .clr(clr), .en(as_i), .done(das));

  assign gp_word = 24'(gp) << (24 - GP_W);
  assign ega = (ad_i[7:0] != 8'hFF) &&
               ((ad_i[31:8] == '0) || (ad_i[31:8] == gp_word));

  assign ms = 3'(ms_i);
  assign set_eg = ega && das && (ms == MS_0 || ms == MS_1) && !eg && !ak_i;
  assign res_eg = !as_i || ak_i;

  always_ff @(posedge clk) begin
    if (clr)
      eg <= 1'b0;
    else if (set_eg && !res_eg)
      eg <= 1'b1;
    else if (res_eg && !set_eg)
      eg <= 1'b0;
  end
endmodule
