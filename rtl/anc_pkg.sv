// anc_pkg: constants and types shared by the FASTBUS segment ancillary logic.
//
// The logic is synchronous to one clock of CLK_NS nanoseconds; every delay of
// the ancillary logic timing table is expressed as a number of clock cycles,
// rounded so that the delay lands inside the MIN/MAX window the FASTBUS rules
// allow. Two sets are given: the 15 m cable segment (the default of every
// module, as in the cable segment module) and the 19-inch crate segment.
// The clock period is a choice of this implementation, not of the standard.
package anc_pkg;

  // Clock period in nanoseconds (implementation choice).
  parameter int unsigned CLK_NS = 10;

  // ---- 15 m cable segment (defaults) ----------------------------------
  parameter int unsigned CBL_T_ATAK = 13;   // >= 130 ns bus clean-up after AK(d)
  parameter int unsigned CBL_T_TM1  = 44;   // >= 440 ns arbitration time
  parameter int unsigned CBL_T_TM2  = 83;   // >= 830 ns GK(u) timeout
  parameter int unsigned CBL_T_TM3  = 18;   // >= 180 ns AR = 0 (2 bus delays)
  parameter int unsigned CBL_T_TM4  = 18;   // >= 180 ns WT = 0 (2 bus delays)
  parameter int unsigned CBL_T_DTA  = 70;   // 680..730 ns broadcast AK delay
  parameter int unsigned CBL_T_DTD  = 228;  // 2180..2380 ns broadcast DK delay
  parameter int unsigned CBL_T_RB   = 25;   // 200..300 ns RB integration

  // ---- 19-inch crate segment --------------------------------------------
  parameter int unsigned CRT_T_ATAK = 4;    // >= 40 ns
  parameter int unsigned CRT_T_TM1  = 12;   // >= 120 ns
  parameter int unsigned CRT_T_TM2  = 65;   // >= 650 ns
  parameter int unsigned CRT_T_TM3  = 3;    // >= 30 ns
  parameter int unsigned CRT_T_TM4  = 3;    // >= 30 ns
  parameter int unsigned CRT_T_DTA  = 52;   // 500..550 ns
  parameter int unsigned CRT_T_DTD  = 210;  // 2000..2200 ns
  parameter int unsigned CRT_T_RB   = 12;   // 100..150 ns

  // ---- GAC slave delays (both segment types) ----------------------------
  parameter int unsigned T_DTAS = 4;        // <= 60 ns address decoding (EG delay)
  parameter int unsigned T_DTDS = 20;       // data decoding delay
  parameter int unsigned T_DTDK = 20;       // data response delay; DTDS+DTDK <= 1000 ns

  // Power-on clear length (implementation choice).
  parameter int unsigned T_PWR_CLR = 16;

  // Arbitration level lines AL<5:0>.
  parameter int unsigned AL_W = 6;

  // Mode select codes MS<2:0>. Address cycle: space; data cycle: transfer
  // type. A unit that does not use MS<2> (MS_W = 2) sees it as 0.
  typedef enum logic [2:0] {
    MS_0 = 3'd0,   // address: data space        data: random transfer
    MS_1 = 3'd1,   // address: CSR space         data: block transfer
    MS_2 = 3'd2,   // address: broadcast data    data: secondary address
    MS_3 = 3'd3    // address: broadcast CSR     data: reserved
  } ms_t;

  // Slave status responses.
  typedef enum logic [2:0] {
    SS_OK  = 3'd0,
    SS_ERR = 3'd6  // error / rejected operation
  } ss_t;

endpackage
