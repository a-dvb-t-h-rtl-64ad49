// dvb_pkg: types, constants and small functions shared by the DVB-T/H
// baseband transmitter and receiver.
//
// Modes follow the DVB-T/H standard: 2K/4K/8K FFT, guard interval (GI) ratio
// 1/32..1/4, QPSK/16-QAM/64-QAM cells, boosted pilots of amplitude 4/3.
// Complex samples are 16-bit signed pairs; a data cell of unit power is
// represented with the value UNIT = 1024 (Q10).
//
// The continual-pilot carrier table holds the 45 positions of the 2K mode.
// In the standard these 45 are also the first continual pilots of the 4K and
// 8K modes, so the table is used as a (partial) continual-pilot set in every
// mode; the remaining 4K/8K continual pilots are treated as data carriers
// by both ends of this link. TPS carriers are not modelled.
package dvb_pkg;

  localparam int DW     = 16;   // complex sample component width
  localparam int UNIT   = 1024; // unit amplitude in cell domain
  localparam int LOGMAX = 13;   // 8K
  localparam int NMAX   = 1 << LOGMAX;
  localparam int KMAX   = 6817; // used carriers in 8K mode
  localparam int JMAX   = (KMAX - 1) / 3 + 1; // carriers k = 0 mod 3 in 8K

  typedef enum logic [1:0] {MODE_2K = 2'd0, MODE_4K = 2'd1, MODE_8K = 2'd2} fft_mode_e;
  typedef enum logic [1:0] {GI_1_32 = 2'd0, GI_1_16 = 2'd1, GI_1_8 = 2'd2, GI_1_4 = 2'd3} gi_e;
  typedef enum logic [1:0] {QPSK = 2'd0, QAM16 = 2'd1, QAM64 = 2'd2} constel_e;

  typedef struct packed {
    logic signed [DW-1:0] re;
    logic signed [DW-1:0] im;
  } cplx_t;

  // Pilot amplitude 4/3 * UNIT
  localparam int PILOT_AMP = 1365;
  // Constellation level spacing (amplitude of level 1) in UNIT scale:
  // UNIT/sqrt(2), UNIT/sqrt(10), UNIT/sqrt(42)
  localparam int LVL_QPSK  = 724;
  localparam int LVL_QAM16 = 324;
  localparam int LVL_QAM64 = 158;

  function automatic int fft_log2(fft_mode_e m);
    return 11 + int'(m);
  endfunction

  function automatic int n_used(fft_mode_e m);
    case (m)
      MODE_2K: return 1705;
      MODE_4K: return 3409;
      default: return 6817;
    endcase
  endfunction

  // Guard length in samples: NF/32 .. NF/4
  function automatic int gi_len(fft_mode_e m, gi_e g);
    return (1 << fft_log2(m)) >> (5 - int'(g));
  endfunction

  function automatic int bits_per_cell(constel_e c);
    return 2 * (int'(c) + 1);
  endfunction

  // Continual pilot carrier (2K set, see header)
  function automatic logic is_cp(int k);
    case (k)
      0, 48, 54, 87, 141, 156, 192, 201, 255, 279, 282, 333, 432, 450, 483,
      525, 531, 618, 636, 714, 759, 765, 780, 804, 873, 888, 918, 939, 942,
      969, 984, 1050, 1101, 1107, 1110, 1137, 1140, 1146, 1206, 1269, 1323,
      1377, 1491, 1683, 1704: return 1'b1;
      default: return 1'b0;
    endcase
  endfunction

  localparam int NCP = 45;
  function automatic int cp_pos(int i);
    case (i)
      0: return 0;    1: return 48;   2: return 54;   3: return 87;   4: return 141;
      5: return 156;  6: return 192;  7: return 201;  8: return 255;  9: return 279;
      10: return 282; 11: return 333; 12: return 432; 13: return 450; 14: return 483;
      15: return 525; 16: return 531; 17: return 618; 18: return 636; 19: return 714;
      20: return 759; 21: return 765; 22: return 780; 23: return 804; 24: return 873;
      25: return 888; 26: return 918; 27: return 939; 28: return 942; 29: return 969;
      30: return 984; 31: return 1050; 32: return 1101; 33: return 1107; 34: return 1110;
      35: return 1137; 36: return 1140; 37: return 1146; 38: return 1206; 39: return 1269;
      40: return 1323; 41: return 1377; 42: return 1491; 43: return 1683; default: return 1704;
    endcase
  endfunction

  // Scattered pilot: every 12th carrier, shifted by 3 carriers per symbol
  function automatic logic is_sp(int k, logic [1:0] sym_phase);
    return (k % 12) == 3 * int'(sym_phase);
  endfunction

  // FFT bin of carrier k: carriers are centred on DC
  function automatic int carrier_bin(int k, fft_mode_e m, int shift);
    int nf;
    nf = 1 << fft_log2(m);
    return (k - (n_used(m) - 1) / 2 + shift + 2 * nf) % nf;
  endfunction

  // One step of the pilot reference PRBS x^11 + x^2 + 1 (reset to all ones).
  // Returns the next register; bit 10 of the current register is w_k.
  function automatic logic [10:0] prbs_next(logic [10:0] r);
    return {r[9:0], r[10] ^ r[8]};
  endfunction

endpackage
