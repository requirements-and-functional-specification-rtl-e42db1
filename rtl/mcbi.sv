// mcbi -- Monitor and Control Bus interface and register file (MCBI block).
//
// The board's MCB FPGA configures and monitors the Filter FPGA over a simple
// synchronous bus: 8-bit address, 16-bit bidirectional data, a low-true
// select, a read/write line (1 = read) and its own clock, unrelated to the
// 256 MHz system clock.  This block holds every configuration register of
// the register map and returns the measurements of the other blocks.
// Following the specification:
//   * Addresses, widths and read/write directions are those of the register
//     map.  Reads of shorter registers return zero in the upper bits (the
//     phase error D1_PERR is sign-extended).
//   * CM_STS: status events of the blocks are collected in a working
//     register, which is saved and cleared at every tick; reads return the
//     saved value, and a write XORs the written bits into it.
//   * CM_ERR: bit 0 write to a read-only register, bit 1 write to a
//     non-existent register, bit 2 read from a non-existent register.  A
//     write stores the written value (zero clears).
//   * CM_DEF: receives the data of the last write to a read-only or
//     non-existent register, is returned for reads of a non-existent
//     register, and can be written as a test register.
//   * CM_DID: design identifier (parameter DID).
//   * CM_CTL bit 0 is a momentary software reset (`sw_rst`).
// This design's choices:
//   * Bus timing: a write is taken at the first rising MCB clock edge with
//     select low and read/write low; it is passed to the 256 MHz domain
//     with a toggle and a two-stage synchronizer, so writes must be at
//     least four 256 MHz clocks apart (true of any MCB clock below 64 MHz).
//     Read data is selected combinationally from the 256 MHz registers by
//     the bus address; the bus holds the address for at least one MCB clock
//     so the data is settled when the bus samples it.
//   * Registers whose write has a side effect (coefficient, mixer and tone
//     table values) produce a one-clock strobe in `wstb`.  STAGE1 and STAGE2
//     coefficient writes are accepted only while their CM_CTL access bit is
//     set.  Writing FM_TADD sets the tone table pointer and each FM_TVAL
//     write advances it.
//   * Reset values are zero except S1_XBAR (FIR32 n takes sample n, the
//     identity crossbar), D2_SEED (0x1357, from the specification), the
//     stage scale factors (0x0001: bits 31:16 of the sum, rounded, which the
//     specification names as the value that can never overflow), FM_QSCL
//     (0x7FFF, unity fraction) and FM_QBIT (3, 4-bit samples).
//   * Status bits 0 and 5..9 come from the clock manager and the STICK capture,
//     outside this logic, through `sts_evt` like the others.
//
// Timing: a write reaches `cfg` three to four 256 MHz clocks after the MCB
// clock edge that takes it.
module mcbi
  import sbf_pkg::*;
#(
  parameter logic [15:0] DID = 16'h2511
) (
  input  logic        clk,
  input  logic        rst,
  input  logic        tick,
  // MCB
  input  logic        mcb_clk,
  input  logic        mcb_cs_n,
  input  logic        mcb_rd_wr_n,
  input  logic [7:0]  mcb_addr,
  input  logic [15:0] mcb_data_i,
  output logic [15:0] mcb_data_o,
  output logic        mcb_oe,
  // to and from the blocks
  output cfg_t        cfg,
  output wstb_t       wstb,
  output logic        sw_rst,
  input  mon_t        mon
);
  // ---------------- MCB clock domain ----------------
  logic        wr_tgl, rd_tgl;
  logic [7:0]  w_addr, r_addr;
  logic [15:0] w_data;
  logic        mcb_sel_d;

  // No reset here: the 256 MHz side ignores the toggles until they have
  // passed its synchronizer once after reset.
  always_ff @(posedge mcb_clk) begin
    mcb_sel_d <= !mcb_cs_n;
    if (!mcb_cs_n && !mcb_sel_d) begin
      if (!mcb_rd_wr_n) begin
        w_addr <= mcb_addr; w_data <= mcb_data_i; wr_tgl <= ~wr_tgl;
      end else begin
        r_addr <= mcb_addr; rd_tgl <= ~rd_tgl;
      end
    end
  end

  assign mcb_oe = !mcb_cs_n && mcb_rd_wr_n;

  // ---------------- 256 MHz domain ----------------
  logic [2:0] wr_s, rd_s;
  logic [1:0] arm;
  always_ff @(posedge clk) begin
    wr_s <= {wr_s[1:0], wr_tgl};
    rd_s <= {rd_s[1:0], rd_tgl};
    if (rst)              arm <= '0;
    else if (arm != 2'd3) arm <= arm + 2'd1;
  end
  logic wr_go, rd_go;
  assign wr_go = (arm == 2'd3) && (wr_s[2] ^ wr_s[1]);
  assign rd_go = (arm == 2'd3) && (rd_s[2] ^ rd_s[1]);

  // register kinds: 0 = none, 1 = read-only, 2 = read/write
  function automatic logic [1:0] reg_kind(input logic [7:0] a);
    case (a)
      A_CM_DID, A_IO_CRC, A_IO_TINT0, A_D1_DERR, A_D1_PERR, A_D1_ODLY2, A_D1_ODLY1,
      A_D1_ODLY0, A_S1_ODC2, A_S1_ODC1, A_S1_ODC0, A_S1_VDC1, A_S1_VDC0, A_S2_WADD,
      A_S3_WADD, A_S4_WADD, A_FM_VCF1, A_FM_VCF0, A_FM_VCN1, A_FM_VCN0,
      A_FM_PWF3, 8'hC6, 8'hC7, A_FM_PWF0, A_FM_PWN3, 8'hCA, 8'hCB, A_FM_PWN0,
      A_FM_TVC1, A_FM_TVC0, A_FM_TCOS2, 8'hD6, A_FM_TCOS0, A_FM_TSIN2, 8'hD9,
      A_FM_TSIN0, A_FM_QCC1, A_FM_QCC0, A_FM_QSTC1, A_FM_QSTC0, A_FM_QPW2, 8'hE3,
      A_FM_QPW0, A_FM_CCNT1, A_FM_CCNT0, A_FM_BCNT1, A_FM_BCNT0, A_FM_IDATA,
      A_D2_CRC:
        return 2'd1;
      A_CM_STS, A_CM_CFG, A_CM_CTL, A_CM_ERR, A_CM_DEF, 8'h06, 8'h07, 8'h08, 8'h09,
      A_IO_ESEL, A_IO_DSEL, A_IO_SDLY, A_IO_TINT1, A_IO_SID,
      A_D1_DDEC, A_D1_DMUX, A_D1_DLY2, A_D1_DLY1, A_D1_DLY0, A_D1_DLYR1, A_D1_DLYR0,
      A_D1_DEPE, A_D1_TDLY,
      A_S1_DDEC, A_S1_XBAR3, 8'h42, 8'h43, A_S1_XBAR0, A_S1_CADD, A_S1_CVAL,
      A_S1_VLEN, A_S1_FDLY, A_S1_SCALE, A_S1_FBIT, A_S1_IDC1, A_S1_IDC0,
      A_S2_DDEC, A_S2_CADD, A_S2_CVAL, A_S2_VLEN, A_S2_FDLY, A_S2_SCALE, A_S2_MADD,
      A_S2_MCOS, A_S2_MSIN, A_S2_MFAZ1, A_S2_MFAZ0, A_S2_MFAZR1, A_S2_MFAZR0,
      A_S2_CDEC, A_S2_NTAP,
      A_S3_DDEC, A_S3_CADD, A_S3_CVAL, A_S3_VLEN, A_S3_FDLY, A_S3_SCALE, A_S3_CDEC,
      A_S3_NTAP,
      A_S4_DDEC, A_S4_CADD, A_S4_CVAL, A_S4_VLEN, A_S4_FDLY, A_S4_SCALE, A_S4_CDEC,
      A_S4_NTAP,
      A_FM_DSEL, A_FM_TADD, A_FM_TVAL, A_FM_TFAZ1, A_FM_TFAZ0, A_FM_TFAZR1,
      A_FM_TFAZR0, A_FM_QSCL, A_FM_QBIT, A_FM_QST, A_FM_BLEV, A_FM_BLEN,
      A_D2_DSEL, A_D2_ESEL, A_D2_ADLY, A_D2_BDLY, A_D2_CDLY, A_D2_SEED:
        return 2'd2;
      default: return 2'd0;
    endcase
  endfunction

  logic [15:0] sts_work, sts_saved, cm_err, cm_def;

  always_ff @(posedge clk) begin
    if (rst) begin
      cfg          <= '0;
      cfg.s1_xbar  <= 64'hFEDC_BA98_7654_3210;
      cfg.d2_seed  <= 16'h1357;
      cfg.s1_scale <= 16'h0001; cfg.s2_scale <= 16'h0001;
      cfg.s3_scale <= 16'h0001; cfg.s4_scale <= 16'h0001;
      cfg.fm_qscl  <= 16'h7FFF; cfg.fm_qbit  <= 3'd3;
      wstb <= '0; sw_rst <= 1'b0;
      sts_work <= '0; sts_saved <= '0; cm_err <= '0; cm_def <= '0;
    end else begin
      logic [15:0] d;
      d = w_data;
      wstb <= '0;
      wstb.wdata <= d;
      sw_rst <= 1'b0;
      cfg.cm_ctl[CTL_SWRESET] <= 1'b0;

      // status: collect events, save and clear at the tick
      if (tick) begin
        sts_saved <= sts_work | 16'(mon.sts_evt);
        sts_work  <= '0;
      end else begin
        sts_work <= sts_work | 16'(mon.sts_evt);
      end

      if (rd_go && reg_kind(r_addr) == 2'd0) cm_err[2] <= 1'b1;

      if (wr_go) begin
        case (reg_kind(w_addr))
          2'd0: begin cm_err[1] <= 1'b1; cm_def <= d; end
          2'd1: begin cm_err[0] <= 1'b1; cm_def <= d; end
          default: ;
        endcase
        case (w_addr)
          A_CM_STS:    sts_saved <= sts_saved ^ d;
          A_CM_CFG:    cfg.cm_cfg <= d;
          A_CM_CTL:    begin cfg.cm_ctl <= d; sw_rst <= d[CTL_SWRESET]; end
          A_CM_ERR:    cm_err <= {13'd0, d[2:0]};
          A_CM_DEF:    cm_def <= d;
          8'h06:       cfg.cm_tst[0] <= d[7:0];
          8'h07:       cfg.cm_tst[1] <= d[7:0];
          8'h08:       cfg.cm_tst[2] <= d[7:0];
          8'h09:       cfg.cm_tst[3] <= d[7:0];
          A_IO_ESEL:   cfg.io_esel <= d[6:0];
          A_IO_DSEL:   cfg.io_dsel <= d[6:0];
          A_IO_SDLY:   cfg.io_sdly <= d;
          A_IO_TINT1:  cfg.io_tmode <= d[15:14];
          A_IO_SID:    cfg.io_sid <= d;
          A_D1_DDEC:   cfg.d1_ddec <= d[3:0];
          A_D1_DMUX:   cfg.d1_dmux <= d[3:0];
          A_D1_DLY2:   cfg.d1_dly[47:32] <= d;
          A_D1_DLY1:   cfg.d1_dly[31:16] <= d;
          A_D1_DLY0:   cfg.d1_dly[15:0]  <= d;
          A_D1_DLYR1:  cfg.d1_dlyr[31:16] <= d;
          A_D1_DLYR0:  cfg.d1_dlyr[15:0]  <= d;
          A_D1_DEPE:   cfg.d1_depe <= d;
          A_D1_TDLY:   cfg.d1_tdly <= d[12:0];
          A_S1_DDEC:   cfg.s1_ddec <= d[3:0];
          A_S1_XBAR3:  cfg.s1_xbar[15:0]  <= d;
          8'h42:       cfg.s1_xbar[31:16] <= d;
          8'h43:       cfg.s1_xbar[47:32] <= d;
          A_S1_XBAR0:  cfg.s1_xbar[63:48] <= d;
          A_S1_CADD:   cfg.s1_cadd <= d[3:0];
          A_S1_CVAL:   wstb.s1_cval <= cfg.cm_ctl[CTL_S1_LOAD];
          A_S1_VLEN:   cfg.s1_vlen <= d[9:0];
          A_S1_FDLY:   cfg.s1_fdly <= d[9:0];
          A_S1_SCALE:  cfg.s1_scale <= d;
          A_S1_FBIT:   cfg.s1_fbit <= d[3:0];
          A_S1_IDC1:   cfg.s1_idc[31:16] <= d;
          A_S1_IDC0:   cfg.s1_idc[15:0]  <= d;
          A_S2_DDEC:   cfg.s2_ddec <= d[3:0];
          A_S2_CADD:   cfg.s2_cadd <= d[3:0];
          A_S2_CVAL:   wstb.s2_cval <= cfg.cm_ctl[CTL_S2_LOAD];
          A_S2_VLEN:   cfg.s2_vlen <= d[9:0];
          A_S2_FDLY:   cfg.s2_fdly <= d[9:0];
          A_S2_SCALE:  cfg.s2_scale <= d;
          A_S2_MADD:   cfg.s2_madd <= d[9:0];
          A_S2_MCOS:   wstb.s2_mcos <= 1'b1;
          A_S2_MSIN:   wstb.s2_msin <= 1'b1;
          A_S2_MFAZ1:  cfg.s2_mfaz[31:16] <= d;
          A_S2_MFAZ0:  cfg.s2_mfaz[15:0]  <= d;
          A_S2_MFAZR1: cfg.s2_mfazr[31:16] <= d;
          A_S2_MFAZR0: cfg.s2_mfazr[15:0]  <= d;
          A_S2_CDEC:   cfg.s2_cdec <= d[3:0];
          A_S2_NTAP:   cfg.s2_ntap <= d[8:0];
          A_S3_DDEC:   cfg.s3_ddec <= d[3:0];
          A_S3_CADD:   cfg.s3_cadd <= d[7:0];
          A_S3_CVAL:   wstb.s3_cval <= 1'b1;
          A_S3_VLEN:   cfg.s3_vlen <= d[9:0];
          A_S3_FDLY:   cfg.s3_fdly <= d[9:0];
          A_S3_SCALE:  cfg.s3_scale <= d;
          A_S3_CDEC:   cfg.s3_cdec <= d[3:0];
          A_S3_NTAP:   cfg.s3_ntap <= d[8:0];
          A_S4_DDEC:   cfg.s4_ddec <= d[3:0];
          A_S4_CADD:   cfg.s4_cadd <= d[8:0];
          A_S4_CVAL:   wstb.s4_cval <= 1'b1;
          A_S4_VLEN:   cfg.s4_vlen <= d[9:0];
          A_S4_FDLY:   cfg.s4_fdly <= d[9:0];
          A_S4_SCALE:  cfg.s4_scale <= d;
          A_S4_CDEC:   cfg.s4_cdec <= d[3:0];
          A_S4_NTAP:   cfg.s4_ntap <= d[8:0];
          A_FM_DSEL:   cfg.fm_dsel <= d[3:0];
          A_FM_TADD:   begin cfg.fm_tadd <= d[7:0]; wstb.fm_tadd <= 1'b1; end
          A_FM_TVAL:   wstb.fm_tval <= 1'b1;
          A_FM_TFAZ1:  cfg.fm_tfaz[31:16] <= d;
          A_FM_TFAZ0:  cfg.fm_tfaz[15:0]  <= d;
          A_FM_TFAZR1: cfg.fm_tfazr[31:16] <= d;
          A_FM_TFAZR0: cfg.fm_tfazr[15:0]  <= d;
          A_FM_QSCL:   cfg.fm_qscl <= d;
          A_FM_QBIT:   cfg.fm_qbit <= d[2:0];
          A_FM_QST:    cfg.fm_qst <= d[7:0];
          A_FM_BLEV:   cfg.fm_blev <= d;
          A_FM_BLEN:   cfg.fm_blen <= d;
          A_D2_DSEL:   cfg.d2_dsel <= d[2:0];
          A_D2_ESEL:   cfg.d2_esel <= d[2:0];
          A_D2_ADLY:   cfg.d2_adly <= d[12:0];
          A_D2_BDLY:   cfg.d2_bdly <= d[12:0];
          A_D2_CDLY:   cfg.d2_cdly <= d[12:0];
          A_D2_SEED:   cfg.d2_seed <= d;
          default: ;
        endcase
      end
    end
  end

  // ---------------- read multiplexer ----------------
  always_comb begin
    logic [15:0] r;
    case (mcb_addr)
      A_CM_STS:    r = sts_saved;
      A_CM_CFG:    r = cfg.cm_cfg;
      A_CM_CTL:    r = cfg.cm_ctl;
      A_CM_ERR:    r = cm_err;
      A_CM_DEF:    r = cm_def;
      A_CM_DID:    r = DID;
      8'h06:       r = 16'(cfg.cm_tst[0]);
      8'h07:       r = 16'(cfg.cm_tst[1]);
      8'h08:       r = 16'(cfg.cm_tst[2]);
      8'h09:       r = 16'(cfg.cm_tst[3]);
      A_IO_ESEL:   r = 16'(cfg.io_esel);
      A_IO_DSEL:   r = 16'(cfg.io_dsel);
      A_IO_CRC:    r = 16'(mon.io_crc);
      A_IO_SDLY:   r = cfg.io_sdly;
      A_IO_TINT1:  r = {cfg.io_tmode, 8'd0, mon.io_tint[21:16]};
      A_IO_TINT0:  r = mon.io_tint[15:0];
      A_IO_SID:    r = cfg.io_sid;
      A_D1_DDEC:   r = 16'(cfg.d1_ddec);
      A_D1_DMUX:   r = 16'(cfg.d1_dmux);
      A_D1_DLY2:   r = cfg.d1_dly[47:32];
      A_D1_DLY1:   r = cfg.d1_dly[31:16];
      A_D1_DLY0:   r = cfg.d1_dly[15:0];
      A_D1_DLYR1:  r = cfg.d1_dlyr[31:16];
      A_D1_DLYR0:  r = cfg.d1_dlyr[15:0];
      A_D1_DEPE:   r = cfg.d1_depe;
      A_D1_TDLY:   r = 16'(cfg.d1_tdly);
      A_D1_DERR:   r = mon.d1_derr;
      A_D1_PERR:   r = {{4{mon.d1_perr[11]}}, mon.d1_perr};
      A_D1_ODLY2:  r = mon.d1_odly[47:32];
      A_D1_ODLY1:  r = mon.d1_odly[31:16];
      A_D1_ODLY0:  r = mon.d1_odly[15:0];
      A_S1_DDEC:   r = 16'(cfg.s1_ddec);
      A_S1_XBAR3:  r = cfg.s1_xbar[15:0];
      8'h42:       r = cfg.s1_xbar[31:16];
      8'h43:       r = cfg.s1_xbar[47:32];
      A_S1_XBAR0:  r = cfg.s1_xbar[63:48];
      A_S1_CADD:   r = 16'(cfg.s1_cadd);
      A_S1_CVAL:   r = 16'(mon.s1_cval);
      A_S1_VLEN:   r = 16'(cfg.s1_vlen);
      A_S1_FDLY:   r = 16'(cfg.s1_fdly);
      A_S1_SCALE:  r = cfg.s1_scale;
      A_S1_FBIT:   r = 16'(cfg.s1_fbit);
      A_S1_IDC1:   r = cfg.s1_idc[31:16];
      A_S1_IDC0:   r = cfg.s1_idc[15:0];
      A_S1_ODC2:   r = mon.s1_odc[47:32];
      A_S1_ODC1:   r = mon.s1_odc[31:16];
      A_S1_ODC0:   r = mon.s1_odc[15:0];
      A_S1_VDC1:   r = 16'(mon.s1_vdc[21:16]);
      A_S1_VDC0:   r = mon.s1_vdc[15:0];
      A_S2_DDEC:   r = 16'(cfg.s2_ddec);
      A_S2_CADD:   r = 16'(cfg.s2_cadd);
      A_S2_CVAL:   r = mon.s2_cval;
      A_S2_VLEN:   r = 16'(cfg.s2_vlen);
      A_S2_FDLY:   r = 16'(cfg.s2_fdly);
      A_S2_SCALE:  r = cfg.s2_scale;
      A_S2_MADD:   r = 16'(cfg.s2_madd);
      A_S2_MCOS:   r = mon.s2_mcos;
      A_S2_MSIN:   r = mon.s2_msin;
      A_S2_MFAZ1:  r = cfg.s2_mfaz[31:16];
      A_S2_MFAZ0:  r = cfg.s2_mfaz[15:0];
      A_S2_MFAZR1: r = cfg.s2_mfazr[31:16];
      A_S2_MFAZR0: r = cfg.s2_mfazr[15:0];
      A_S2_CDEC:   r = 16'(cfg.s2_cdec);
      A_S2_NTAP:   r = 16'(cfg.s2_ntap);
      A_S2_WADD:   r = 16'(mon.s2_wadd);
      A_S3_DDEC:   r = 16'(cfg.s3_ddec);
      A_S3_CADD:   r = 16'(cfg.s3_cadd);
      A_S3_CVAL:   r = mon.s3_cval;
      A_S3_VLEN:   r = 16'(cfg.s3_vlen);
      A_S3_FDLY:   r = 16'(cfg.s3_fdly);
      A_S3_SCALE:  r = cfg.s3_scale;
      A_S3_CDEC:   r = 16'(cfg.s3_cdec);
      A_S3_NTAP:   r = 16'(cfg.s3_ntap);
      A_S3_WADD:   r = 16'(mon.s3_wadd);
      A_S4_DDEC:   r = 16'(cfg.s4_ddec);
      A_S4_CADD:   r = 16'(cfg.s4_cadd);
      A_S4_CVAL:   r = mon.s4_cval;
      A_S4_VLEN:   r = 16'(cfg.s4_vlen);
      A_S4_FDLY:   r = 16'(cfg.s4_fdly);
      A_S4_SCALE:  r = cfg.s4_scale;
      A_S4_CDEC:   r = 16'(cfg.s4_cdec);
      A_S4_NTAP:   r = 16'(cfg.s4_ntap);
      A_S4_WADD:   r = 16'(mon.s4_wadd);
      A_FM_DSEL:   r = 16'(cfg.fm_dsel);
      A_FM_VCF1:   r = 16'(mon.fm_vcf[21:16]);
      A_FM_VCF0:   r = mon.fm_vcf[15:0];
      A_FM_VCN1:   r = 16'(mon.fm_vcn[21:16]);
      A_FM_VCN0:   r = mon.fm_vcn[15:0];
      A_FM_PWF3:   r = 16'(mon.fm_pwf[51:48]);
      8'hC6:       r = mon.fm_pwf[47:32];
      8'hC7:       r = mon.fm_pwf[31:16];
      A_FM_PWF0:   r = mon.fm_pwf[15:0];
      A_FM_PWN3:   r = 16'(mon.fm_pwn[51:48]);
      8'hCA:       r = mon.fm_pwn[47:32];
      8'hCB:       r = mon.fm_pwn[31:16];
      A_FM_PWN0:   r = mon.fm_pwn[15:0];
      A_FM_TADD:   r = 16'(cfg.fm_tadd);
      A_FM_TVAL:   r = mon.fm_tval;
      A_FM_TFAZ1:  r = cfg.fm_tfaz[31:16];
      A_FM_TFAZ0:  r = cfg.fm_tfaz[15:0];
      A_FM_TFAZR1: r = cfg.fm_tfazr[31:16];
      A_FM_TFAZR0: r = cfg.fm_tfazr[15:0];
      A_FM_TVC1:   r = 16'(mon.fm_tvc[21:16]);
      A_FM_TVC0:   r = mon.fm_tvc[15:0];
      A_FM_TCOS2:  r = 16'(mon.fm_tcos[35:32]);
      8'hD6:       r = mon.fm_tcos[31:16];
      A_FM_TCOS0:  r = mon.fm_tcos[15:0];
      A_FM_TSIN2:  r = 16'(mon.fm_tsin[35:32]);
      8'hD9:       r = mon.fm_tsin[31:16];
      A_FM_TSIN0:  r = mon.fm_tsin[15:0];
      A_FM_QSCL:   r = cfg.fm_qscl;
      A_FM_QCC1:   r = 16'(mon.fm_qcc[21:16]);
      A_FM_QCC0:   r = mon.fm_qcc[15:0];
      A_FM_QBIT:   r = 16'(cfg.fm_qbit);
      A_FM_QST:    r = 16'(cfg.fm_qst);
      A_FM_QSTC1:  r = 16'(mon.fm_qstc[21:16]);
      A_FM_QSTC0:  r = mon.fm_qstc[15:0];
      A_FM_QPW2:   r = 16'(mon.fm_qpw[35:32]);
      8'hE3:       r = mon.fm_qpw[31:16];
      A_FM_QPW0:   r = mon.fm_qpw[15:0];
      A_FM_CCNT1:  r = 16'(mon.fm_ccnt[21:16]);
      A_FM_CCNT0:  r = mon.fm_ccnt[15:0];
      A_FM_BLEV:   r = cfg.fm_blev;
      A_FM_BLEN:   r = cfg.fm_blen;
      A_FM_BCNT1:  r = 16'(mon.fm_bcnt[21:16]);
      A_FM_BCNT0:  r = mon.fm_bcnt[15:0];
      A_FM_IDATA:  r = mon.fm_idata;
      A_D2_DSEL:   r = 16'(cfg.d2_dsel);
      A_D2_CRC:    r = 16'(mon.d2_crc);
      A_D2_ESEL:   r = 16'(cfg.d2_esel);
      A_D2_ADLY:   r = 16'(cfg.d2_adly);
      A_D2_BDLY:   r = 16'(cfg.d2_bdly);
      A_D2_CDLY:   r = 16'(cfg.d2_cdly);
      A_D2_SEED:   r = cfg.d2_seed;
      default:     r = cm_def;
    endcase
    mcb_data_o = r;
  end
endmodule
