// stage_fir -- time-multiplexed decimating FIR filter of STAGE2, STAGE3 and STAGE4.
//
// The later stages see input rates low enough that a few multipliers can be
// reused for many taps.  Each of NMUL multipliers owns a data RAM (1024 x 16)
// and a coefficient RAM (512/NMUL x 16), as in the stage block diagrams of
// the specification (STAGE2: 32 multipliers, STAGE3: 2, STAGE4: 1).  Input
// samples are written to all data RAMs at successive addresses.  At every
// output sample (input strobe coinciding with the decimated enable of
// `ddec`) a computation starts: in calculation step j (0, 1, ...) multiplier
// m handles tap k = j*NMUL + m, multiplying coefficient j of its RAM by the
// sample k positions back from the newest one.  Steps are paced by a second
// enable derived from `cdec` (the "calculation rate"), the NMUL products of a
// step are summed and accumulated in 40 bits, and after (ntap+1)/NMUL steps
// the top 32 bits of the accumulator go to the common output block
// (stage_post).  The number of taps is ntap+1 (64, 128, 256 or 512).
//
// With MIXER = 1 and `mix` set, even multipliers store the cosine data and
// odd ones the sine data, coefficient k is applied to the sample k/2 back,
// and the coefficient file is the interleaved cosine/sine set: this is the
// single-sideband mix of STAGE2 in the specification.
//
// Coefficients are loaded as in the specification: with `cadd` = a, each
// write of `cval` shifts entry a through the chain of coefficient RAMs from
// multiplier NMUL-1 towards multiplier 0, so that after NMUL writes the
// first value written sits in multiplier 0; `cval_rd` shows entry a of
// multiplier 0.  With NMUL = 1 this is plain random access.
//
// `raddr` (the "reset data RAM addresses next tick" control bit) restarts
// the write address at 0 on the tick sample; `wadd` is the write address seen
// at the last tick.  The scheduling details (start one clock after the output
// strobe, one register between product sum and accumulator, validity and
// tick accumulated over the decimation window) are this design's choices.
// The computation must finish by the next output strobe, that is
// (ntap+1)/NMUL * 2^cdec <= 2^ddec / 2^(input divider) clocks, which the
// register settings of the specification satisfy.
//
// Timing: out.stb follows the output strobe by ((ntap+1)/NMUL - 1) * 2^cdec
// + 5 clocks (with cdec = 0: steps + 4).
module stage_fir
  import sbf_pkg::*;
#(
  parameter int NMUL  = 32,
  parameter bit MIXER = 1'b0,
  parameter int CAW   = $clog2(512 / NMUL)
) (
  input  logic               clk,
  input  logic               rst,
  input  logic               in_stb,
  input  logic signed [15:0] in_d,      // data, or cosine data when mixing
  input  logic signed [15:0] in_d2,     // sine data when mixing
  input  logic               in_v,
  input  logic               in_tk,
  input  logic               in_nd,
  input  logic signed [11:0] in_pe,
  input  logic               mix,
  input  logic [3:0]         ddec,
  input  logic [3:0]         cdec,
  input  logic [8:0]         ntap,
  input  logic [CAW-1:0]     cadd,
  input  logic               cval_we,
  input  logic [15:0]        cval,
  input  logic               raddr,
  input  logic [9:0]         vlen,
  input  logic [9:0]         fdly,
  input  logic [15:0]        scale,
  output nb_t                out,
  output logic               clip,
  output logic [15:0]        cval_rd,
  output logic [9:0]         wadd
);
  localparam int L = 512 / NMUL;        // coefficients per multiplier
  localparam int MLOG = $clog2(NMUL);

  logic        use_mix;
  assign use_mix = MIXER && mix;

  // ---------------- write side ----------------
  logic [9:0] wp, wr_addr;
  assign wr_addr = (in_stb && in_tk && raddr) ? 10'd0 : wp;

  always_ff @(posedge clk) begin
    if (rst) begin
      wp <= '0; wadd <= '0;
    end else if (in_stb) begin
      wp <= wr_addr + 10'd1;
      if (in_tk) wadd <= wr_addr;
    end
  end

  // ---------------- output strobe and window accumulation ----------------
  logic ce_dec, out_ce, ce_calc;
  ce_gen u_ced (.clk(clk), .rst(rst), .div(ddec), .sync(in_stb && in_tk), .ce(ce_dec));
  assign out_ce = in_stb && ce_dec;

  logic               v_acc, tk_acc;
  logic               start;
  logic               s_v, s_tk, s_nd;
  logic signed [11:0] s_pe;
  always_ff @(posedge clk) begin
    if (rst) begin
      v_acc <= 1'b1; tk_acc <= 1'b0; start <= 1'b0;
      s_v <= 1'b0; s_tk <= 1'b0; s_nd <= 1'b0; s_pe <= '0;
    end else begin
      start <= out_ce;
      if (in_stb) begin
        if (out_ce) begin
          v_acc <= 1'b1; tk_acc <= 1'b0;
          s_v <= v_acc && in_v; s_tk <= tk_acc || in_tk; s_nd <= in_nd; s_pe <= in_pe;
        end else begin
          v_acc <= v_acc && in_v; tk_acc <= tk_acc || in_tk;
        end
      end
    end
  end

  ce_gen u_cec (.clk(clk), .rst(rst), .div(cdec), .sync(start), .ce(ce_calc));

  // ---------------- step sequencer ----------------
  logic           busy;
  logic [9:0]     base_r, cur_base;
  logic [CAW-1:0] j_r, cur_j, j_last;
  logic           fire;

  assign cur_base = start ? (wp - 10'd1) : base_r;
  assign cur_j    = start ? '0 : j_r;
  assign fire     = (start || busy) && ce_calc;
  assign j_last   = CAW'((({1'b0, ntap} + 10'd1) >> MLOG) - 10'd1);

  always_ff @(posedge clk) begin
    if (rst) begin
      busy <= 1'b0; base_r <= '0; j_r <= '0;
    end else if (fire) begin
      base_r <= cur_base;
      j_r    <= cur_j + 1'b1;
      busy   <= (cur_j != j_last);
    end else if (start) begin
      base_r <= cur_base; j_r <= '0; busy <= 1'b1;
    end
  end

  // ---------------- multipliers with their RAMs ----------------
  logic signed [31:0] prod [NMUL];
  logic [15:0]        cchain [NMUL+1];
  assign cchain[NMUL] = cval;
  assign cval_rd      = cchain[0];

  for (genvar m = 0; m < NMUL; m++) begin : g_mul
    logic [15:0] dmem [1024];
    logic [15:0] cmem [L];
    logic [9:0]  k, idx;
    logic [15:0] dsel;

    assign dsel = (use_mix && (m % 2 == 1)) ? in_d2 : in_d;
    always_ff @(posedge clk) if (in_stb) dmem[wr_addr] <= dsel;

    assign cchain[m] = cmem[cadd];
    always_ff @(posedge clk) if (cval_we) cmem[cadd] <= cchain[m+1];

    assign k   = 10'(cur_j) * 10'(NMUL) + 10'(m);
    assign idx = use_mix ? (k >> 1) : k;
    assign prod[m] = (k <= {1'b0, ntap}) ?
                     $signed(cmem[cur_j]) * $signed(dmem[cur_base - idx]) : 32'sd0;
  end

  // ---------------- accumulation ----------------
  logic signed [39:0] psum, acc;
  logic               p_valid, p_last;
  logic               fin_stb;
  logic               q_v, q_tk, q_nd;
  logic signed [11:0] q_pe;
  logic signed [39:0] fin_x;   // bits [7:0] are below the output block's 32-bit input

  always_ff @(posedge clk) begin
    logic signed [39:0] s;
    if (rst) begin
      psum <= '0; p_valid <= 1'b0; p_last <= 1'b0; acc <= '0; fin_stb <= 1'b0; fin_x <= '0;
      q_v <= 1'b0; q_tk <= 1'b0; q_nd <= 1'b0; q_pe <= '0;
    end else begin
      // hold the side signals of this output while the next window starts
      if (fire && cur_j == j_last) begin
        q_v <= s_v; q_tk <= s_tk; q_nd <= s_nd; q_pe <= s_pe;
      end
      s = '0;
      for (int m = 0; m < NMUL; m++) s = s + 40'(prod[m]);
      p_valid <= fire;
      p_last  <= fire && (cur_j == j_last);
      if (fire) psum <= s;
      fin_stb <= 1'b0;
      if (p_valid) begin
        if (p_last) begin
          fin_x   <= acc + psum;
          fin_stb <= 1'b1;
          acc     <= '0;
        end else begin
          acc <= acc + psum;
        end
      end
    end
  end

  stage_post u_post (
    .clk(clk), .rst(rst), .in_stb(fin_stb), .in_x(fin_x[39:8]), .in_v(q_v),
    .in_tk(q_tk), .in_nd(q_nd), .in_pe(q_pe), .scale(scale), .vlen(vlen),
    .fdly(fdly), .out(out), .clip(clip));
endmodule
