// stage2_mixer -- phase shifter (complex mixer) at the front of STAGE2.
//
// Lets a band narrower than 128 MHz be taken from anywhere in the 128 MHz
// STAGE1 output, and can remove the phase of the fractional delay error.  A
// 32-bit phase accumulator (fraction of a cycle) advances by the phase rate
// at every input sample; at a tick it is reloaded with the phase and rate
// registers (S2_MFAZ, S2_MFAZR) unless model updates are disabled (CM_CTL
// bit 6).  When CM_CFG bit 9 is set the sample's 12-bit phase error is added
// at bits [31:20] and the phase error passed on becomes zero.  The top 10
// bits address two 1024-entry tables (cosine and sine, loaded through
// S2_MADD / S2_MCOS / S2_MSIN, entry n = phase n/1024 cycle), and the sample
// is multiplied by both: (d * table + 2^14) >> 15, clipped to 16 bits.  The
// table sizes, the 10-bit address and the register interface follow the
// specification; the rounding, the phase-error position and the two-clock
// pipeline are this design's choices.
//
// Timing: out_stb, out_cos, out_sin and the passed side signals follow
// in_stb by two clocks.  Table writes (cos_we / sin_we) take effect at the
// next clock; cos_rd / sin_rd show the entry at `madd`.
module stage2_mixer (
  input  logic               clk,
  input  logic               rst,
  input  logic               in_stb,
  input  logic signed [15:0] in_d,
  input  logic               in_v,
  input  logic               in_tk,
  input  logic               in_nd,
  input  logic signed [11:0] in_pe,
  input  logic [31:0]        faz,
  input  logic [31:0]        fazr,
  input  logic               noupd,
  input  logic               use_pe,
  input  logic [9:0]         madd,
  input  logic               cos_we,
  input  logic               sin_we,
  input  logic [15:0]        wdata,
  output logic [15:0]        cos_rd,
  output logic [15:0]        sin_rd,
  output logic               out_stb,
  output logic signed [15:0] out_cos,
  output logic signed [15:0] out_sin,
  output logic               out_v,
  output logic               out_tk,
  output logic               out_nd,
  output logic signed [11:0] out_pe
);
  logic [15:0] cos_lut [1024];
  logic [15:0] sin_lut [1024];

  always_ff @(posedge clk) begin
    if (cos_we) cos_lut[madd] <= wdata;
    if (sin_we) sin_lut[madd] <= wdata;
  end
  assign cos_rd = cos_lut[madd];
  assign sin_rd = sin_lut[madd];

  // phase generator
  logic [31:0] phase, rate, ph_now, ph_used;
  assign ph_now  = (in_tk && !noupd) ? faz : phase;
  assign ph_used = ph_now + (use_pe ? {in_pe, 20'd0} : 32'd0);

  always_ff @(posedge clk) begin
    if (rst) begin
      phase <= '0; rate <= '0;
    end else if (in_stb) begin
      if (in_tk && !noupd) begin
        phase <= faz + fazr; rate <= fazr;
      end else begin
        phase <= phase + rate;
      end
    end
  end

  // pipeline: [a] table address, [b] products
  logic               a_stb, a_v, a_tk, a_nd;
  logic signed [11:0] a_pe;
  logic signed [15:0] a_d;
  logic [9:0]         a_addr;

  function automatic logic signed [15:0] mulq15(input logic signed [15:0] x,
                                                input logic signed [15:0] c);
    logic signed [31:0] p;
    p = (x * c + 32'sd16384) >>> 15;
    if (p > 32'sd32767)       return 16'sd32767;
    else if (p < -32'sd32768) return -16'sd32768;
    else                      return p[15:0];
  endfunction

  always_ff @(posedge clk) begin
    if (rst) begin
      a_stb <= 1'b0; a_v <= 1'b0; a_tk <= 1'b0; a_nd <= 1'b0; a_pe <= '0; a_d <= '0; a_addr <= '0;
      out_stb <= 1'b0; out_cos <= '0; out_sin <= '0; out_v <= 1'b0; out_tk <= 1'b0;
      out_nd <= 1'b0; out_pe <= '0;
    end else begin
      a_stb <= in_stb;
      if (in_stb) begin
        a_d <= in_d; a_v <= in_v; a_tk <= in_tk; a_nd <= in_nd;
        a_pe <= use_pe ? 12'sd0 : in_pe;
        a_addr <= ph_used[31:22];
      end
      out_stb <= a_stb;
      if (a_stb) begin
        out_cos <= mulq15(a_d, $signed(cos_lut[a_addr]));
        out_sin <= mulq15(a_d, $signed(sin_lut[a_addr]));
        out_v <= a_v; out_tk <= a_tk; out_nd <= a_nd; out_pe <= a_pe;
      end
    end
  end
endmodule
