// sbf_top -- Station Board Filter FPGA: one sub-band of a wideband correlator
// station board.
//
// A chain of Filter FPGAs shares one wideband sample stream (64 wires at
// 128 MHz, re-clocked at 256 MHz); each FPGA cuts one narrow sub-band out of
// it, delays it by a geometric delay model and sends it, requantized to 4 or
// 8 bits, to the downstream Output, VSI and Timing FPGAs.  The blocks, in
// data order, are those of the specification's block diagram:
//   INOUT  -> DELAY1 -> STAGE1 -> STAGE2 -> STAGE3 -> STAGE4 -> FORMAT -> DELAY2
// with MCBI holding the registers.  STAGE1 takes 2048 MHz of bandwidth down
// to 128 MHz; STAGE2 to 64..8 MHz; STAGE3 to 4..0.5 MHz; STAGE4 to
// 250..31.25 kHz.  Every stage output goes to FORMAT, which picks one (FM_DSEL),
// so unused later stages simply run on.  All logic runs on the single 256 MHz
// clock; sample rates below it are clock enables from the divider registers.
//
// Interface: the 256 MHz clock is an input (the clock manager that
// generates it from the board clock is not part of this logic); its lock and
// phase-shift handshake are brought out as ports (dcm_*), driven from CM_CTL
// bits 12, 13 and 15 and reported in CM_STS bits 0, 6 and 7.  The MCB data
// bus is split into input, output and output enable.  The four test port
// wires each show one of 256 internal signals chosen by CM_TST0..3.
//
// This design's choices: rst_n is synchronized to the 256 MHz clock; the
// datapath is also held in reset by the momentary software reset (CM_CTL
// bit 0) and while clocking is disabled (CM_CTL bit 1); the test port signal
// numbering (see the probe assignment below); CM_STS bits 3 and 5 stay
// zero.
module sbf_top
  import sbf_pkg::*;
#(
  parameter int          D1_AW = 13,          // DELAY1 line: 2^13 words
  parameter int          D2_AW = 13,          // DELAY2 lines: 2^13 clocks
  parameter logic [15:0] DID   = 16'h2511
) (
  input  logic        sclk,                   // 256 MHz system clock
  input  logic        rst_n,
  // wideband input ports A and B
  input  logic [63:0] idata_a, idata_b,
  input  logic        itick_a, itick_b,
  input  logic        ivalid_a, ivalid_b,
  input  logic        inoise_a, inoise_b,
  input  logic        iderr_a, iderr_b,
  input  logic        idfrm_a, idfrm_b,
  input  logic        iclk_a, iclk_b,
  input  logic        stick,                  // system tick
  // wideband output ports A and B
  output logic [63:0] odata_a, odata_b,
  output logic        otick_a, otick_b,
  output logic        ovalid_a, ovalid_b,
  output logic        onoise_a, onoise_b,
  output logic        oderr_a, oderr_b,
  output logic        odfrm_a, odfrm_b,
  output logic        oclk_a, oclk_b,
  // narrow band outputs
  output logic [3:0]  adata, bdata, cperr,
  output logic        atick, btick, ctick,
  output logic        asind, bsind, csind,
  // MCB
  input  logic        mcb_clk,
  input  logic        mcb_cs_n,
  input  logic        mcb_rd_wr_n,
  input  logic [7:0]  mcb_addr,
  input  logic [15:0] mcb_data_i,
  output logic [15:0] mcb_data_o,
  output logic        mcb_oe,
  // clock manager handshake
  input  logic        dcm_locked,
  input  logic        dcm_ps_done,
  input  logic        dcm_ps_ovf,
  output logic        dcm_ps_inc,
  output logic        dcm_ps_en,
  output logic        dcm_rst,
  // test port
  output logic [3:0]  tst
);
  // ---------------- resets ----------------
  logic [1:0] rsync;
  logic       rst, sw_rst, drst;
  always_ff @(posedge sclk) rsync <= {rsync[0], rst_n};
  assign rst = !rsync[1];

  cfg_t  cfg;
  wstb_t wstb;
  mon_t  mon;

  always_ff @(posedge sclk) drst <= rst || sw_rst || cfg.cm_ctl[CTL_CLKDIS];

  // ---------------- INOUT ----------------
  logic [63:0] w_data;
  logic        w_tick, w_valid, w_noise, w_derr, w_dfrm, evt_stick, evt_smatch, evt_slead;

  inout_io u_io (
    .clk(sclk), .rst(drst),
    .idata_a(idata_a), .idata_b(idata_b), .itick_a(itick_a), .itick_b(itick_b),
    .ivalid_a(ivalid_a), .ivalid_b(ivalid_b), .inoise_a(inoise_a), .inoise_b(inoise_b),
    .iderr_a(iderr_a), .iderr_b(iderr_b), .idfrm_a(idfrm_a), .idfrm_b(idfrm_b),
    .iclk_a(iclk_a), .iclk_b(iclk_b), .stick(stick),
    .sel_b(cfg.cm_cfg[CFG_IN_B]), .en_a(cfg.cm_cfg[CFG_OUT_A]), .en_b(cfg.cm_cfg[CFG_OUT_B]),
    .data_edge(cfg.cm_cfg[CFG_DATA_EDGE]), .stick_edge(cfg.cm_cfg[CFG_STICK_EDGE]),
    .esel(cfg.io_esel), .dsel(cfg.io_dsel), .sdly(cfg.io_sdly), .tmode(cfg.io_tmode),
    .odata_a(odata_a), .odata_b(odata_b), .otick_a(otick_a), .otick_b(otick_b),
    .ovalid_a(ovalid_a), .ovalid_b(ovalid_b), .onoise_a(onoise_a), .onoise_b(onoise_b),
    .oderr_a(oderr_a), .oderr_b(oderr_b), .odfrm_a(odfrm_a), .odfrm_b(odfrm_b),
    .oclk_a(oclk_a), .oclk_b(oclk_b),
    .d_data(w_data), .d_tick(w_tick), .d_valid(w_valid), .d_noise(w_noise),
    .d_derr(w_derr), .d_dfrm(w_dfrm),
    .mon_crc(mon.io_crc), .mon_tint(mon.io_tint), .evt_stick_width(evt_stick),
    .evt_stick_match(evt_smatch), .evt_stick_lead(evt_slead));

  // ---------------- DELAY1 ----------------
  logic               d1_ce, d1_tick, d1_valid, d1_noise, evt_pat, evt_frm;
  logic [63:0]        d1_data;
  logic signed [11:0] d1_pe;
  logic [3:0]         d1_frac;

  delay1 #(.AW(D1_AW)) u_d1 (
    .clk(sclk), .rst(drst),
    .in_data(w_data), .in_tick(w_tick), .in_valid(w_valid), .in_noise(w_noise),
    .in_derr(w_derr), .in_dfrm(w_dfrm),
    .ddec(cfg.d1_ddec), .dmux(cfg.d1_dmux), .dly(cfg.d1_dly), .dlyr(cfg.d1_dlyr),
    .depe(cfg.d1_depe), .tdly(cfg.d1_tdly), .noupd(cfg.cm_ctl[CTL_D1_NOUPD]),
    .vlbi(cfg.cm_cfg[CFG_VLBI]), .perr_neg(cfg.cm_cfg[CFG_PERR_NEG]),
    .out_ce(d1_ce), .out_data(d1_data), .out_tick(d1_tick), .out_valid(d1_valid),
    .out_noise(d1_noise), .out_pe(d1_pe), .out_frac(d1_frac),
    .mon_derr(mon.d1_derr), .mon_perr(mon.d1_perr), .mon_odly(mon.d1_odly),
    .evt_pattern(evt_pat), .evt_dfrm(evt_frm));

  // ---------------- STAGE1 .. STAGE4 ----------------
  nb_t        s1, s2, s3, s4;
  logic [3:0] clip;

  stage1 u_s1 (
    .clk(sclk), .rst(drst),
    .in_ce(d1_ce), .in_data(d1_data), .in_tk(d1_tick), .in_v(d1_valid),
    .in_nd(d1_noise), .in_pe(d1_pe), .in_frac(d1_frac),
    .mode8(cfg.cm_cfg[CFG_S1_8BIT]), .vlbi(cfg.cm_cfg[CFG_VLBI]),
    .load(cfg.cm_ctl[CTL_S1_LOAD]), .fbit_en(cfg.cm_ctl[CTL_S1_FBIT]), .fbit(cfg.s1_fbit),
    .xbar(cfg.s1_xbar), .cadd(cfg.s1_cadd), .cval_we(wstb.s1_cval),
    .cval(wstb.wdata[11:0]), .ddec(cfg.s1_ddec), .vlen(cfg.s1_vlen), .fdly(cfg.s1_fdly),
    .scale(cfg.s1_scale), .idc(cfg.s1_idc),
    .out(s1), .clip(clip[0]), .cval_rd(mon.s1_cval), .odc(mon.s1_odc), .vdc(mon.s1_vdc));

  stage2 u_s2 (
    .clk(sclk), .rst(drst), .in(s1),
    .mix_en(cfg.cm_cfg[CFG_MIXER]), .mix_pe(cfg.cm_cfg[CFG_MIX_PERR]),
    .mix_noupd(cfg.cm_ctl[CTL_S2_NOUPD]), .mfaz(cfg.s2_mfaz), .mfazr(cfg.s2_mfazr),
    .madd(cfg.s2_madd), .mcos_we(wstb.s2_mcos), .msin_we(wstb.s2_msin),
    .wdata(wstb.wdata), .mcos_rd(mon.s2_mcos), .msin_rd(mon.s2_msin),
    .ddec(cfg.s2_ddec), .cdec(cfg.s2_cdec), .ntap(cfg.s2_ntap), .cadd(cfg.s2_cadd),
    .cval_we(wstb.s2_cval), .raddr(cfg.cm_ctl[CTL_S2_RADDR]), .vlen(cfg.s2_vlen),
    .fdly(cfg.s2_fdly), .scale(cfg.s2_scale),
    .out(s2), .clip(clip[1]), .cval_rd(mon.s2_cval), .wadd(mon.s2_wadd));

  stage3 u_s3 (
    .clk(sclk), .rst(drst), .in(s2),
    .ddec(cfg.s3_ddec), .cdec(cfg.s3_cdec), .ntap(cfg.s3_ntap), .cadd(cfg.s3_cadd),
    .cval_we(wstb.s3_cval), .cval(wstb.wdata), .raddr(cfg.cm_ctl[CTL_S3_RADDR]),
    .vlen(cfg.s3_vlen), .fdly(cfg.s3_fdly), .scale(cfg.s3_scale),
    .out(s3), .clip(clip[2]), .cval_rd(mon.s3_cval), .wadd(mon.s3_wadd));

  stage4 u_s4 (
    .clk(sclk), .rst(drst), .in(s3),
    .ddec(cfg.s4_ddec), .cdec(cfg.s4_cdec), .ntap(cfg.s4_ntap), .cadd(cfg.s4_cadd),
    .cval_we(wstb.s4_cval), .cval(wstb.wdata), .raddr(cfg.cm_ctl[CTL_S4_RADDR]),
    .vlen(cfg.s4_vlen), .fdly(cfg.s4_fdly), .scale(cfg.s4_scale),
    .out(s4), .clip(clip[3]), .cval_rd(mon.s4_cval), .wadd(mon.s4_wadd));

  // ---------------- FORMAT ----------------
  nb_t                st [4];
  logic               f_stb, f_v, f_tk;
  logic signed [7:0]  f_d, f_pe;
  assign st = '{s1, s2, s3, s4};

  format u_fm (
    .clk(sclk), .rst(drst), .s_in(st), .s_clip(clip),
    .dsel(cfg.fm_dsel), .flip_en(cfg.cm_cfg[CFG_FLIP]),
    .flip_sync(cfg.cm_ctl[CTL_FM_FLIPSYNC]), .noupd(cfg.cm_ctl[CTL_FM_NOUPD]),
    .blev(cfg.fm_blev), .blen(cfg.fm_blen), .qscl(cfg.fm_qscl), .qbit(cfg.fm_qbit),
    .qst(cfg.fm_qst), .tfaz(cfg.fm_tfaz), .tfazr(cfg.fm_tfazr),
    .tadd_we(wstb.fm_tadd), .tval_we(wstb.fm_tval), .wdata(wstb.wdata),
    .out_stb(f_stb), .out_d(f_d), .out_v(f_v), .out_tk(f_tk), .out_pe(f_pe),
    .ccnt(mon.fm_ccnt), .bcnt(mon.fm_bcnt), .pwf(mon.fm_pwf), .pwn(mon.fm_pwn),
    .vcf(mon.fm_vcf), .vcn(mon.fm_vcn), .qcc(mon.fm_qcc), .qstc(mon.fm_qstc),
    .qpw(mon.fm_qpw), .idata(mon.fm_idata), .tval_rd(mon.fm_tval),
    .tcos(mon.fm_tcos), .tsin(mon.fm_tsin), .tvc(mon.fm_tvc));

  // ---------------- DELAY2 ----------------
  delay2 #(.AW(D2_AW)) u_d2 (
    .clk(sclk), .rst(drst),
    .in_stb(f_stb), .in_d(f_d), .in_v(f_v), .in_tk(f_tk), .in_pe(f_pe),
    .mode8(cfg.cm_cfg[CFG_D2_8BIT]), .intgen(cfg.cm_cfg[CFG_D2_INTGEN]),
    .no_acbal(cfg.cm_cfg[CFG_D2_NO_ACBAL]), .no_b7v(cfg.cm_cfg[CFG_D2_NO_B7V]),
    .dsel(cfg.d2_dsel), .esel(cfg.d2_esel), .adly(cfg.d2_adly), .bdly(cfg.d2_bdly),
    .cdly(cfg.d2_cdly), .seed(cfg.d2_seed),
    .adata(adata), .bdata(bdata), .cperr(cperr), .atick(atick), .btick(btick),
    .ctick(ctick), .asind(asind), .bsind(bsind), .csind(csind), .mon_crc(mon.d2_crc));

  // ---------------- MCBI ----------------
  always_comb begin
    mon.sts_evt = '0;
    mon.sts_evt[0] = !dcm_locked;
    mon.sts_evt[STS_STICK_WIDTH] = evt_stick;
    mon.sts_evt[STS_DERR_PAT]    = evt_pat;
    mon.sts_evt[STS_DFRM_PHASE]  = evt_frm;
    mon.sts_evt[6] = dcm_ps_done;
    mon.sts_evt[7] = dcm_ps_ovf;
    mon.sts_evt[8] = evt_smatch;
    mon.sts_evt[9] = evt_slead;
  end

  mcbi #(.DID(DID)) u_mcbi (
    .clk(sclk), .rst(rst), .tick(w_tick),
    .mcb_clk(mcb_clk), .mcb_cs_n(mcb_cs_n), .mcb_rd_wr_n(mcb_rd_wr_n),
    .mcb_addr(mcb_addr), .mcb_data_i(mcb_data_i), .mcb_data_o(mcb_data_o),
    .mcb_oe(mcb_oe), .cfg(cfg), .wstb(wstb), .sw_rst(sw_rst), .mon(mon));

  assign dcm_ps_inc = cfg.cm_ctl[12];
  assign dcm_ps_en  = cfg.cm_ctl[13];
  assign dcm_rst    = cfg.cm_ctl[15];

  // ---------------- test port ----------------
  // Probe numbers: 0..4 wideband tick, valid, noise, delay error, frame;
  // 5..8 DELAY1 enable, tick, valid, noise; 9..16 strobe and tick of STAGE1..4;
  // 17..20 stage clip flags; 21..23 FORMAT strobe, valid, tick;
  // 24..29 ATICK, ASIND, BTICK, BSIND, CTICK, CSIND; 32..35 ADATA;
  // 36..39 CPERR; 48..63 the sample FORMAT has selected; others read zero.
  logic [255:0] probe;
  always_comb begin
    probe = '0;
    probe[4:0]   = {w_dfrm, w_derr, w_noise, w_valid, w_tick};
    probe[8:5]   = {d1_noise, d1_valid, d1_tick, d1_ce};
    probe[16:9]  = {s4.tk, s4.stb, s3.tk, s3.stb, s2.tk, s2.stb, s1.tk, s1.stb};
    probe[20:17] = clip;
    probe[23:21] = {f_tk, f_v, f_stb};
    probe[29:24] = {csind, ctick, bsind, btick, asind, atick};
    probe[35:32] = adata;
    probe[39:36] = cperr;
    probe[63:48] = st[cfg.fm_dsel[1:0]].d;
  end

  always_ff @(posedge sclk) begin
    for (int i = 0; i < 4; i++) tst[i] <= probe[cfg.cm_tst[i]];
  end
endmodule
