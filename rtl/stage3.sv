// stage3 -- third-stage decimating FIR wrapper.
//
// STAGE3: 8 MHz down to 4, 2, 1 or 0.5 MHz, with two multipliers at 256 MHz (the input rate is at most 16 Ms/s, so 2 x 16 x 16 = 512 taps fit at decimation by 16).  Coefficients: 256 addresses of 2 values each.
// The filter itself is stage_fir with NMUL = 2 (see that module for the
// schedule, coefficient loading and timing); this wrapper fixes the size and
// maps the stage's registers onto it.
module stage3
  import sbf_pkg::*;
(
  input  logic         clk,
  input  logic         rst,
  input  nb_t          in,
  input  logic [3:0]   ddec,
  input  logic [3:0]   cdec,
  input  logic [8:0]   ntap,
  input  logic [7:0]   cadd,
  input  logic         cval_we,
  input  logic [15:0]  cval,
  input  logic         raddr,
  input  logic [9:0]   vlen,
  input  logic [9:0]   fdly,
  input  logic [15:0]  scale,
  output nb_t          out,
  output logic         clip,
  output logic [15:0]  cval_rd,
  output logic [9:0]   wadd
);
  stage_fir #(.NMUL(2), .MIXER(1'b0)) u_fir (
    .clk(clk), .rst(rst), .in_stb(in.stb), .in_d(in.d), .in_d2(16'sd0),
    .in_v(in.v), .in_tk(in.tk), .in_nd(in.nd), .in_pe(in.pe), .mix(1'b0),
    .ddec(ddec), .cdec(cdec), .ntap(ntap), .cadd(cadd), .cval_we(cval_we),
    .cval(cval), .raddr(raddr), .vlen(vlen), .fdly(fdly), .scale(scale),
    .out(out), .clip(clip), .cval_rd(cval_rd), .wadd(wadd));
endmodule
