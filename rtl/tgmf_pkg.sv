// tgmf_pkg: shared types and the default configuration of the time-gated
// multi-frequency serial-parallel wrapper.
//
// The wrapper tests one group of virtual cores (VCs) at a time; inside a group
// every VC shifts in parallel on its own shift clock, a power-of-two fraction
// of the tester (TAM) rate f_t, and takes ceil(w / ratio) of the external TAM
// wires. The default configuration is the final schedule of the seven-VC
// example core hCADT01: W_EXT = 7 external wires, four groups
//   G0 = {VC1 w=4 @100 MHz, VC3 w=2 @100 MHz, VC2 w=5 @12.5 MHz}
//   G1 = {VC5 w=6 @100 MHz, VC7 w=2 @25 MHz}
//   G2 = {VC4 w=7 @100 MHz}
//   G3 = {VC6 w=7 @100 MHz}
// with f_t = 100 MHz. Widths, frequencies and groups follow the example; the
// wrapper scan chain lengths are this design's own balanced partition of the
// example's scan chains and I/O cells (they reproduce the example's shelf
// heights, 6.89 / 5.21 / 2.19 / 1.14 = L / f_s). The PLL rate (1.5 GHz, so
// T_DIV = 15 PLL cycles per TAM cycle), the capture-pulse dividers and the wire
// offsets are this design's choices. Index 0 is VC1, index 6 is VC7.
package tgmf_pkg;

  localparam int N_VC     = 7;
  localparam int N_GROUPS = 4;
  localparam int W_EXT    = 7;   // external TAM width (WPI / WPO)
  localparam int W_MAX    = 7;   // widest virtual TAM of any VC
  localparam int N_RATES  = 4;   // trial shift rates f_t / 2^k, k = 0..3 (100 .. 12.5 MHz)
  localparam int T_DIV    = 15;  // PLL cycles per TAM cycle (1.5 GHz / 100 MHz)
  localparam int PAT_W    = 16;  // width of the pattern counter

  typedef int unsigned vc_arr_t [N_VC];

  localparam vc_arr_t VC_W      = '{4, 5, 2, 7, 6, 7, 2};          // wrapper scan chains per VC
  localparam vc_arr_t VC_DIVLOG = '{0, 3, 0, 0, 0, 0, 2};          // f_s = f_t / 2^VC_DIVLOG
  localparam vc_arr_t VC_GROUP  = '{0, 0, 0, 2, 1, 3, 1};          // shelf (group) of each VC
  localparam vc_arr_t VC_OFS    = '{0, 6, 4, 0, 0, 0, 6};          // first external wire used
  localparam vc_arr_t VC_LEN    = '{689, 150, 546, 219, 521, 114, 71}; // wrapper scan length
  localparam vc_arr_t VC_CDIV   = '{8, 3, 13, 2, 3, 5, 6};         // PLL cycles launch->capture
  // Test power of each VC when shifted at the highest rate f_t (Pow column of
  // the hCADT01 table) and the average-power budget of one group. A VC shifted
  // at f_t / 2^k draws Pow / 2^k; the schedule must keep every group's sum
  // within P_AVE.
  localparam vc_arr_t VC_POW    = '{2572, 450, 930, 1314, 2605, 576, 40};
  localparam int P_AVE    = 4500;

  // Balanced wrapper scan chain partition of every VC: chain k of VC i holds
  // VC_NI[i][k] input cells, then VC_NB[i][k] bits of the core's internal scan
  // chains (linked in series on the core side), then VC_NO[i][k] output cells.
  // Unused chains (k >= VC_W[i]) are all zero. Bidirectional pins count as
  // both an input and an output cell.
  typedef int unsigned ch_arr_t [W_MAX];
  typedef ch_arr_t vc_ch_arr_t [N_VC];

  localparam vc_ch_arr_t VC_NB = '{
    '{644, 644, 642, 642, 0, 0, 0},
    '{150, 150, 150, 0, 0, 0, 0},
    '{465, 465, 0, 0, 0, 0, 0},
    '{219, 219, 219, 219, 219, 219, 0},
    '{521, 521, 521, 521, 521, 0, 0},
    '{82, 82, 82, 81, 81, 81, 87},
    '{20, 20, 0, 0, 0, 0, 0}};
  localparam vc_ch_arr_t VC_NI = '{
    '{45, 44, 46, 46, 0, 0, 0},
    '{0, 0, 0, 108, 108, 0, 0},
    '{81, 80, 0, 0, 0, 0, 0},
    '{0, 0, 0, 0, 0, 0, 183},
    '{0, 0, 0, 0, 0, 189, 0},
    '{32, 32, 32, 32, 32, 32, 26},
    '{44, 43, 0, 0, 0, 0, 0}};
  localparam vc_ch_arr_t VC_NO = '{
    '{25, 25, 27, 27, 0, 0, 0},
    '{0, 0, 0, 70, 69, 0, 0},
    '{40, 40, 0, 0, 0, 0, 0},
    '{0, 0, 0, 0, 0, 0, 103},
    '{0, 0, 0, 0, 0, 296, 0},
    '{21, 21, 20, 21, 21, 21, 15},
    '{51, 51, 0, 0, 0, 0, 0}};
  localparam int MAX_NI = 218;  // most input cells of one VC (VC6: 146 + 72)
  localparam int MAX_NO = 296;  // most output cells of one VC (VC5: 224 + 72)

  function automatic int unsigned ch_sum(ch_arr_t a, int unsigned upto);
    int unsigned s = 0;
    for (int k = 0; k < W_MAX; k++) if (k < upto) s += a[k];
    return s;
  endfunction

  // Test mode instructions held in the wrapper instruction register.
  typedef enum logic [2:0] {
    INSTR_BYPASS = 3'b000,
    INSTR_TGMF   = 3'b001,  // time-gated multi-frequency parallel test of the core
    INSTR_EXTEST = 3'b010   // same scan sequence, boundary cells in interconnect mode
  } instr_e;

  // Number of external wires a VC with w chains at ratio 2^divlog needs.
  function automatic int unsigned ext_wires(int unsigned w, int unsigned divlog);
    return (w + (1 << divlog) - 1) >> divlog;
  endfunction

  // Width of a counter that holds 0..n.
  function automatic int unsigned cnt_w(int unsigned n);
    return (n < 2) ? 1 : $clog2(n + 1);
  endfunction

endpackage
