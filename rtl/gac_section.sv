// gac_section: Geographical Address Control section of the ancillary logic.
//
// The EG generator (eg_gen) and the ancillary logic's own slave at address
// 255 (gac_slave). The slave's CSR#3 holds the segment base address GP,
// which the EG generator uses to recognise global geographical addresses, so
// writing CSR#3 changes which addresses raise EG. On a crate segment this
// section is one board; on the cable segment module it shares a board with
// the ATC section.
//
// Clear: SEG_CLR = PWR CLR + integral(RB).BH*, formed outside; it resets EG,
// the slave's selection, NTA and CSR#3 (GP = 0 afterwards).
// Timing: EG and the slave's AK rise T_DTAS + 1 cycles after AS(u); the
// slave's DK rises about T_DTDS + T_DTDK + 2 cycles after DS(u).
module gac_section #(
  parameter int unsigned GP_W      = 8,
  parameter int unsigned MS_W      = 2,
  parameter logic [15:0] MODULE_ID = 16'h0014,
  parameter int unsigned T_DTAS    = anc_pkg::T_DTAS,
  parameter int unsigned T_DTDS    = anc_pkg::T_DTDS,
  parameter int unsigned T_DTDK    = anc_pkg::T_DTDK
) (
  input  logic            clk,
  input  logic            seg_clr,   // PWR CLR + integral(RB).BH*
  input  logic            as_i,      // received AS
  input  logic            ak_i,      // received AK (wired OR)
  input  logic            ds_i,      // received DS
  input  logic            dk_i,      // received DK (wired OR)
  input  logic [MS_W-1:0] ms_i,      // received MS lines
  input  logic            rd_i,      // received RD
  input  logic [31:0]     ad_i,      // received AD<31:0>
  output logic            eg_o,      // EG driver
  output logic            ak_o,      // AK driver (own slave)
  output logic            dk_o,      // DK driver (own slave)
  output logic [2:0]      ss_o,      // SS<2:0> drivers
  output logic [31:0]     ad_o,      // AD drivers (read data)
  output logic            ad_oe,     // AD drivers enabled
  output logic            ega,       // current address is geographical
  output logic            sel,       // own slave selected
  output logic [GP_W-1:0] gp         // CSR#3, segment base address
);
  eg_gen #(.GP_W(GP_W), .MS_W(MS_W), .T_DTAS(T_DTAS)) u_eg (
    .clk(clk), .clr(seg_clr), .as_i(as_i), .ak_i(ak_i), .ms_i(ms_i),
    .ad_i(ad_i), .gp(gp), .ega(ega), .eg(eg_o));

  gac_slave #(.GP_W(GP_W), .MS_W(MS_W), .MODULE_ID(MODULE_ID), .T_DTAS(T_DTAS),
              .T_DTDS(T_DTDS), .T_DTDK(T_DTDK)) u_gac (
    .clk(clk), .clr(seg_clr), .as_i(as_i), .ak_i(ak_i), .ds_i(ds_i),
    .dk_i(dk_i), .ms_i(ms_i), .rd_i(rd_i), .ad_i(ad_i),
    .sel(sel), .ak_drv(ak_o), .dk_drv(dk_o), .ss_drv(ss_o),
    .ad_drv(ad_o), .ad_oe(ad_oe), .gp(gp));
endmodule
