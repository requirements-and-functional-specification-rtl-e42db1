// stage2 -- second filter stage: 128 MHz down to 64, 32, 16 or 8 MHz.
//
// An optional single-sideband mixer (stage2_mixer) followed by the
// 32-multiplier decimating FIR (stage_fir with NMUL = 32).  Decimation by 2,
// 4, 8 or 16 gives 64, 128, 256 or 512 taps at the full 256 Ms/s input rate
// (specification).  With the mixer enabled (CM_CFG bit 8) the FIR takes the
// cosine and sine products on alternate multipliers and the coefficient file
// holds interleaved cosine/sine coefficients, so the quadrature halves are
// summed into the single-sideband result and the tap count halves.  With the
// mixer bypassed the input goes straight to the FIR.
//
// Interface: `in` / `out` are narrow-band bundles (sbf_pkg::nb_t); the other
// ports are the STAGE2 registers and their write strobes.  Timing: with the
// mixer the FIR sees the input two clocks later; see stage_fir for the rest.
module stage2
  import sbf_pkg::*;
(
  input  logic         clk,
  input  logic         rst,
  input  nb_t          in,
  input  logic         mix_en,
  input  logic         mix_pe,
  input  logic         mix_noupd,
  input  logic [31:0]  mfaz,
  input  logic [31:0]  mfazr,
  input  logic [9:0]   madd,
  input  logic         mcos_we,
  input  logic         msin_we,
  input  logic [15:0]  wdata,
  output logic [15:0]  mcos_rd,
  output logic [15:0]  msin_rd,
  input  logic [3:0]   ddec,
  input  logic [3:0]   cdec,
  input  logic [8:0]   ntap,
  input  logic [3:0]   cadd,
  input  logic         cval_we,
  input  logic         raddr,
  input  logic [9:0]   vlen,
  input  logic [9:0]   fdly,
  input  logic [15:0]  scale,
  output nb_t          out,
  output logic         clip,
  output logic [15:0]  cval_rd,
  output logic [9:0]   wadd
);
  logic               m_stb, m_v, m_tk, m_nd;
  logic signed [15:0] m_cos, m_sin;
  logic signed [11:0] m_pe;

  stage2_mixer u_mix (
    .clk(clk), .rst(rst), .in_stb(in.stb && mix_en), .in_d(in.d), .in_v(in.v),
    .in_tk(in.tk), .in_nd(in.nd), .in_pe(in.pe), .faz(mfaz), .fazr(mfazr),
    .noupd(mix_noupd), .use_pe(mix_pe), .madd(madd), .cos_we(mcos_we),
    .sin_we(msin_we), .wdata(wdata), .cos_rd(mcos_rd), .sin_rd(msin_rd),
    .out_stb(m_stb), .out_cos(m_cos), .out_sin(m_sin), .out_v(m_v),
    .out_tk(m_tk), .out_nd(m_nd), .out_pe(m_pe));

  stage_fir #(.NMUL(32), .MIXER(1'b1)) u_fir (
    .clk(clk), .rst(rst),
    .in_stb(mix_en ? m_stb : in.stb),
    .in_d  (mix_en ? m_cos : in.d),
    .in_d2 (m_sin),
    .in_v  (mix_en ? m_v   : in.v),
    .in_tk (mix_en ? m_tk  : in.tk),
    .in_nd (mix_en ? m_nd  : in.nd),
    .in_pe (mix_en ? m_pe  : in.pe),
    .mix(mix_en), .ddec(ddec), .cdec(cdec), .ntap(ntap), .cadd(cadd),
    .cval_we(cval_we), .cval(wdata), .raddr(raddr), .vlen(vlen), .fdly(fdly),
    .scale(scale), .out(out), .clip(clip), .cval_rd(cval_rd), .wadd(wadd));
endmodule
