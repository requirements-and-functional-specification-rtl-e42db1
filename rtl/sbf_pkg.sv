// sbf_pkg -- shared types and constants of the Station Board Filter FPGA.
//
// The Filter FPGA turns one 64-bit wideband sample "highway" into one narrow
// band.  Every block between STAGE1 and FORMAT passes the same bundle of
// signals: a 16-bit sample, its valid bit, the tick that marks the 10 ms
// model epoch, the noise diode state and a 12-bit phase error, qualified by a
// sample strobe.  That bundle is nb_t.  The register set written over the
// Monitor and Control Bus (MCB) is carried to the blocks as cfg_t (read/write
// registers), wstb_t (one-cycle strobes for registers whose write has a side
// effect, such as shifting a coefficient chain) and mon_t (values the blocks
// return for reading).  Register addresses follow the register map of the
// specification; field widths follow its "Bits" column, except where a
// module's header says otherwise.
package sbf_pkg;

  // Narrow band bundle between the filter stages, FORMAT and DELAY2.
  typedef struct packed {
    logic               stb;   // sample strobe (one cycle per output sample)
    logic signed [15:0] d;     // sample
    logic               v;     // valid
    logic               tk;    // tick, asserted with the strobe of the tick sample
    logic               nd;    // noise diode on
    logic signed [11:0] pe;    // phase error, signed fraction of a cycle
  } nb_t;

  localparam nb_t NB_IDLE = '{stb: 1'b0, d: '0, v: 1'b0, tk: 1'b0, nd: 1'b0, pe: '0};

  // Register addresses (register map of the specification)
  localparam logic [7:0]
    A_CM_STS = 8'h00, A_CM_CFG = 8'h01, A_CM_CTL = 8'h02, A_CM_ERR = 8'h03,
    A_CM_DEF = 8'h04, A_CM_DID = 8'h05, A_CM_TST0 = 8'h06, A_CM_TST3 = 8'h09,
    A_IO_ESEL = 8'h10, A_IO_DSEL = 8'h11, A_IO_CRC = 8'h12, A_IO_SDLY = 8'h13,
    A_IO_TINT1 = 8'h14, A_IO_TINT0 = 8'h15, A_IO_SID = 8'h16,
    A_D1_DDEC = 8'h20, A_D1_DMUX = 8'h21, A_D1_DLY2 = 8'h22, A_D1_DLY1 = 8'h23,
    A_D1_DLY0 = 8'h24, A_D1_DLYR1 = 8'h25, A_D1_DLYR0 = 8'h26, A_D1_DEPE = 8'h27,
    A_D1_TDLY = 8'h28, A_D1_DERR = 8'h29, A_D1_PERR = 8'h2A, A_D1_ODLY2 = 8'h2B,
    A_D1_ODLY1 = 8'h2C, A_D1_ODLY0 = 8'h2D,
    A_S1_DDEC = 8'h40, A_S1_XBAR3 = 8'h41, A_S1_XBAR0 = 8'h44, A_S1_CADD = 8'h45,
    A_S1_CVAL = 8'h46, A_S1_VLEN = 8'h47, A_S1_FDLY = 8'h48, A_S1_SCALE = 8'h49,
    A_S1_FBIT = 8'h4A, A_S1_IDC1 = 8'h4B, A_S1_IDC0 = 8'h4C, A_S1_ODC2 = 8'h4D,
    A_S1_ODC1 = 8'h4E, A_S1_ODC0 = 8'h4F, A_S1_VDC1 = 8'h50, A_S1_VDC0 = 8'h51,
    A_S2_DDEC = 8'h60, A_S2_CADD = 8'h61, A_S2_CVAL = 8'h62, A_S2_VLEN = 8'h63,
    A_S2_FDLY = 8'h64, A_S2_SCALE = 8'h65, A_S2_MADD = 8'h66, A_S2_MCOS = 8'h67,
    A_S2_MSIN = 8'h68, A_S2_MFAZ1 = 8'h69, A_S2_MFAZ0 = 8'h6A, A_S2_MFAZR1 = 8'h6B,
    A_S2_MFAZR0 = 8'h6C, A_S2_CDEC = 8'h6D, A_S2_NTAP = 8'h6E, A_S2_WADD = 8'h6F,
    A_S3_DDEC = 8'h80, A_S3_CADD = 8'h81, A_S3_CVAL = 8'h82, A_S3_VLEN = 8'h83,
    A_S3_FDLY = 8'h84, A_S3_SCALE = 8'h85, A_S3_CDEC = 8'h86, A_S3_NTAP = 8'h87,
    A_S3_WADD = 8'h88,
    A_S4_DDEC = 8'hA0, A_S4_CADD = 8'hA1, A_S4_CVAL = 8'hA2, A_S4_VLEN = 8'hA3,
    A_S4_FDLY = 8'hA4, A_S4_SCALE = 8'hA5, A_S4_CDEC = 8'hA6, A_S4_NTAP = 8'hA7,
    A_S4_WADD = 8'hA8,
    A_FM_DSEL = 8'hC0, A_FM_VCF1 = 8'hC1, A_FM_VCF0 = 8'hC2, A_FM_VCN1 = 8'hC3,
    A_FM_VCN0 = 8'hC4, A_FM_PWF3 = 8'hC5, A_FM_PWF0 = 8'hC8, A_FM_PWN3 = 8'hC9,
    A_FM_PWN0 = 8'hCC, A_FM_TADD = 8'hCD, A_FM_TVAL = 8'hCE, A_FM_TFAZ1 = 8'hCF,
    A_FM_TFAZ0 = 8'hD0, A_FM_TFAZR1 = 8'hD1, A_FM_TFAZR0 = 8'hD2, A_FM_TVC1 = 8'hD3,
    A_FM_TVC0 = 8'hD4, A_FM_TCOS2 = 8'hD5, A_FM_TCOS0 = 8'hD7, A_FM_TSIN2 = 8'hD8,
    A_FM_TSIN0 = 8'hDA, A_FM_QSCL = 8'hDB, A_FM_QCC1 = 8'hDC, A_FM_QCC0 = 8'hDD,
    A_FM_QBIT = 8'hDE, A_FM_QST = 8'hDF, A_FM_QSTC1 = 8'hE0, A_FM_QSTC0 = 8'hE1,
    A_FM_QPW2 = 8'hE2, A_FM_QPW0 = 8'hE4, A_FM_CCNT1 = 8'hE5, A_FM_CCNT0 = 8'hE6,
    A_FM_BLEV = 8'hE7, A_FM_BLEN = 8'hE8, A_FM_BCNT1 = 8'hE9, A_FM_BCNT0 = 8'hEA,
    A_FM_IDATA = 8'hEB,
    A_D2_DSEL = 8'hF0, A_D2_CRC = 8'hF1, A_D2_ESEL = 8'hF2, A_D2_ADLY = 8'hF3,
    A_D2_BDLY = 8'hF4, A_D2_CDLY = 8'hF5, A_D2_SEED = 8'hF6;

  // CM_CFG bits (configuration)
  localparam int CFG_PERR_NEG = 0, CFG_IN_B = 1, CFG_OUT_A = 2, CFG_OUT_B = 3,
                 CFG_STICK_EDGE = 4, CFG_DATA_EDGE = 5, CFG_S1_8BIT = 6,
                 CFG_VLBI = 7, CFG_MIXER = 8, CFG_MIX_PERR = 9, CFG_FLIP = 10,
                 CFG_D2_8BIT = 11, CFG_D2_INTGEN = 12, CFG_D2_NO_ACBAL = 13,
                 CFG_D2_NO_B7V = 14;
  // CM_CTL bits (control)
  localparam int CTL_SWRESET = 0, CTL_CLKDIS = 1, CTL_D1_NOUPD = 2,
                 CTL_S1_LOAD = 3, CTL_S1_FBIT = 4, CTL_S2_LOAD = 5,
                 CTL_S2_NOUPD = 6, CTL_S2_RADDR = 7, CTL_S3_RADDR = 8,
                 CTL_S4_RADDR = 9, CTL_FM_NOUPD = 10, CTL_FM_FLIPSYNC = 11;
  // CM_STS bits (status, 1 = error)
  localparam int STS_STICK_WIDTH = 1, STS_DERR_PAT = 2, STS_DCLK_PHASE = 3,
                 STS_DFRM_PHASE = 4;

  typedef struct packed {
    logic [15:0] cm_cfg, cm_ctl;
    logic [3:0][7:0] cm_tst;
    logic [6:0]  io_esel, io_dsel;
    logic [15:0] io_sdly;
    logic [1:0]  io_tmode;
    logic [15:0] io_sid;
    logic [3:0]  d1_ddec, d1_dmux;
    logic [47:0] d1_dly;
    logic [31:0] d1_dlyr;
    logic [15:0] d1_depe;
    logic [12:0] d1_tdly;
    logic [3:0]  s1_ddec;
    logic [63:0] s1_xbar;
    logic [3:0]  s1_cadd;
    logic [9:0]  s1_vlen, s1_fdly;
    logic [15:0] s1_scale;
    logic [3:0]  s1_fbit;
    logic [31:0] s1_idc;
    logic [3:0]  s2_ddec, s2_cadd;
    logic [9:0]  s2_vlen, s2_fdly;
    logic [15:0] s2_scale;
    logic [9:0]  s2_madd;
    logic [31:0] s2_mfaz, s2_mfazr;
    logic [3:0]  s2_cdec;
    logic [8:0]  s2_ntap;
    logic [3:0]  s3_ddec;
    logic [7:0]  s3_cadd;
    logic [9:0]  s3_vlen, s3_fdly;
    logic [15:0] s3_scale;
    logic [3:0]  s3_cdec;
    logic [8:0]  s3_ntap;
    logic [3:0]  s4_ddec;
    logic [8:0]  s4_cadd;
    logic [9:0]  s4_vlen, s4_fdly;
    logic [15:0] s4_scale;
    logic [3:0]  s4_cdec;
    logic [8:0]  s4_ntap;
    logic [3:0]  fm_dsel;
    logic [7:0]  fm_tadd;
    logic [31:0] fm_tfaz, fm_tfazr;
    logic [15:0] fm_qscl;
    logic [2:0]  fm_qbit;
    logic [7:0]  fm_qst;
    logic [15:0] fm_blev, fm_blen;
    logic [2:0]  d2_dsel, d2_esel;
    logic [12:0] d2_adly, d2_bdly, d2_cdly;
    logic [15:0] d2_seed;
  } cfg_t;

  // One-cycle write strobes; the written value is wdata.
  typedef struct packed {
    logic [15:0] wdata;
    logic s1_cval, s2_cval, s3_cval, s4_cval, s2_mcos, s2_msin, fm_tval, fm_tadd;
  } wstb_t;

  // Values returned by the blocks for reading.
  typedef struct packed {
    logic [9:0]  sts_evt;      // momentary status events (Table of status bits)
    logic [3:0]  io_crc;
    logic [21:0] io_tint;
    logic [15:0] d1_derr;
    logic [11:0] d1_perr;
    logic [47:0] d1_odly;
    logic [11:0] s1_cval;
    logic [47:0] s1_odc;
    logic [21:0] s1_vdc;
    logic [15:0] s2_cval, s2_mcos, s2_msin;
    logic [9:0]  s2_wadd;
    logic [15:0] s3_cval;
    logic [9:0]  s3_wadd;
    logic [15:0] s4_cval;
    logic [9:0]  s4_wadd;
    logic [21:0] fm_vcf, fm_vcn;
    logic [51:0] fm_pwf, fm_pwn;
    logic [15:0] fm_tval;
    logic [21:0] fm_tvc;
    logic [35:0] fm_tcos, fm_tsin;
    logic [21:0] fm_qcc, fm_qstc;
    logic [35:0] fm_qpw;
    logic [21:0] fm_ccnt, fm_bcnt;
    logic [15:0] fm_idata;
    logic [11:0] d2_crc;
  } mon_t;

  // Clip a signed value to +/-32767 (the clipping rule of all filter stages).
  function automatic logic signed [15:0] clip16(input logic signed [47:0] x);
    if (x > 48'sd32767)       return 16'sd32767;
    else if (x < -48'sd32767) return -16'sd32767;
    else                      return x[15:0];
  endfunction

  // 4-bit CRC step, generator x^4 + x + 1 (polynomial is this design's choice).
  function automatic logic [3:0] crc4_step(input logic [3:0] c, input logic b);
    logic fb;
    fb = c[3] ^ b;
    return {c[2], c[1], c[0] ^ fb, fb};
  endfunction

endpackage
