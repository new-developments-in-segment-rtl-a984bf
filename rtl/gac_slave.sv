// gac_slave: the ancillary logic's own FASTBUS slave (GAC slave).
//
// Answers at the reserved geographical address 255 in CSR space:
//   ALA = AD<31:0> = {GP,0..0,FF} or 000000FF,  SET SEL = ALA . (MS=1) . AK* . dBAS
// SEL drives AK until AS(d). In the data cycles that follow, MS and RD are
// sampled into an input register at DS(u) (LMS, LRD), DS is delayed by dTDS
// to DS1, and DK is given dTDK after DS1. Registers:
//   NTA    2-bit pointer, written (LDNTA) and read (RDNTA) in secondary
//          address cycles (LMS = 2);
//   CSR#0  read-only, ID number in bits 31:16 (RDCSR0, NTA = 0, LMS = 0);
//   CSR#3  GP_W-bit read-write segment base address GP used by the EG
//          generator (RDCSR3/LDCSR3, NTA = 3, LMS = 0).
// Status SS = 6 (ISS<2:1> = 11) is returned for every rejected operation:
//   - secondary address write of an invalid NTA value (AD<31:2> /= 0 or
//     AD<1:0> = 1, 2);
//   - a data cycle with MS other than 0 (random) or 2 (secondary address);
//   - a random cycle while NTA = 1 or 2, or a write to CSR#0.
// Writes happen while DS1 is up and DK not yet returned (BDK*). CSR#3 and
// NTA are cleared by PWR CLR + integral(RB).BH*. MS has MS_W lines (2 when
// MS<2> is not received; a missing MS<2> counts as 0).
//
// Timing: AK(u) T_DTAS+1 cycles after AS(u); DK(u) T_DTDS + T_DTDK + 2
// cycles after DS(u) (dTDS + dTDK must stay within 1000 ns); DK(d) one cycle
// after DS(d). Read data and SS are valid from DS1 until DS(d). The
// immediate DK(d), the data bit placement of CSR#3 (AD<GP_W-1:0>) and the
// loading of NTA exactly as the LDNTA equation states (an invalid value is
// stored, and answered with SS = 6) are this implementation's choices.
module gac_slave #(
  parameter int unsigned GP_W      = 8,                 // width of CSR#3
  parameter int unsigned MS_W      = 2,                 // MS lines used (2 or 3)
  parameter logic [15:0] MODULE_ID = 16'h0014,          // CSR#0<31:16>
  parameter int unsigned T_DTAS    = anc_pkg::T_DTAS,
  parameter int unsigned T_DTDS    = anc_pkg::T_DTDS,
  parameter int unsigned T_DTDK    = anc_pkg::T_DTDK
) (
  input  logic            clk,
  input  logic            clr,     // PWR CLR + integral(RB).BH*
  input  logic            as_i,    // received AS
  input  logic            ak_i,    // received AK (wired OR)
  input  logic            ds_i,    // received DS
  input  logic            dk_i,    // received DK (wired OR)
  input  logic [MS_W-1:0] ms_i,    // received MS lines
  input  logic            rd_i,    // received RD (1 = read)
  input  logic [31:0]     ad_i,    // received AD<31:0>
  output logic            sel,     // slave selected
  output logic            ak_drv,  // AK line driver
  output logic            dk_drv,  // DK line driver
  output logic [2:0]      ss_drv,  // SS<2:0> line drivers
  output logic [31:0]     ad_drv,  // AD line drivers (read data)
  output logic            ad_oe,   // AD drivers enabled
  output logic [GP_W-1:0] gp       // CSR#3, segment base address
);
  import anc_pkg::*;

  logic        das, ds1, dk_done;
  logic        ala, set_sel;
  logic        ds_q;
  logic [2:0]  lms;
  logic        lrd;
  logic [1:0]  nta;
  logic        iss;
  logic        rdcsr0, rdcsr3, ldcsr3, ldnta, rdnta;
  logic [31:8] gp_word;

  anc_timer #(.N(T_DTAS)) u_dtas (
    .clk(clk), .clr(clr), .en(as_i), .done(das));

  anc_timer #(.N(T_DTDS)) u_dtds (
    .clk(clk), .clr(clr), .en(sel && ds_i && ds_q), .done(ds1));

  anc_timer #(.N(T_DTDK)) u_dtdk (
    .clk(clk), .clr(clr), .en(ds1), .done(dk_done));

  assign gp_word = 24'(gp) << (24 - GP_W);
  assign ala = (ad_i == {gp_word, 8'hFF}) || (ad_i == 32'h0000_00FF);
  assign set_sel = ala && (3'(ms_i) == MS_1) && !ak_i && das;

  // Decoding of the data cycle (Table of GAC equations).
  always_comb begin
    iss = 1'b0;
    if (ds1) begin
      if (lms == MS_2 && !lrd && ((ad_i[31:2] != '0) || (ad_i[0] ^ ad_i[1])))
        iss = 1'b1;
      if (!(lms == MS_0 || lms == MS_2))
        iss = 1'b1;
      if (lms == MS_0 && ((nta == 2'd1 || nta == 2'd2) || (nta == 2'd0 && !lrd)))
        iss = 1'b1;
    end
  end

  assign rdcsr0 = ds1    && lms == MS_0 && nta == 2'd0 && lrd;
  assign rdcsr3 = ds1    && lms == MS_0 && nta == 2'd3 && lrd;
  assign ldcsr3 = ds1    && lms == MS_0 && nta == 2'd3 && !lrd && !dk_i;
  assign ldnta  = ds1    && lms == MS_2 && !lrd && !dk_i;
  assign rdnta  = ds1    && lms == MS_2 && lrd;

  always_ff @(posedge clk) begin
    if (clr) begin
      sel    <= 1'b0;
      ds_q   <= 1'b0;
      lms    <= 3'd0;
      lrd    <= 1'b0;
      nta    <= 2'd0;
      gp     <= '0;
      dk_drv <= 1'b0;
    end else begin
      if (!as_i)
        sel <= 1'b0;
      else if (set_sel)
        sel <= 1'b1;

      // Input register: MS and RD sampled at DS(u).
      ds_q <= ds_i;
      if (sel && ds_i && !ds_q) begin
        lms <= 3'(ms_i);
        lrd <= rd_i;
      end

      if (ldnta)  nta <= ad_i[1:0];
      if (ldcsr3) gp  <= ad_i[GP_W-1:0];

      if (!ds_i || !sel)
        dk_drv <= 1'b0;
      else if (dk_done)
        dk_drv <= 1'b1;
    end
  end

  assign ak_drv = sel;
  assign ss_drv = (sel && iss) ? SS_ERR : SS_OK;

  always_comb begin
    ad_drv = '0;
    if (rdcsr0)      ad_drv = {MODULE_ID, 16'h0000};
    else if (rdcsr3) ad_drv = 32'(gp);
    else if (rdnta)  ad_drv = 32'(nta);
  end
  assign ad_oe = sel && (rdcsr0 || rdcsr3 || rdnta);
endmodule
