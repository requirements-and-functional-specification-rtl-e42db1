// stage_post -- output block common to STAGE1..STAGE4.
//
// Each filter stage ends in the same four operations, all performed once per
// output sample (when in_stb is high):
//   * scale: the 32-bit filter sum is multiplied by the unsigned 16-bit scale
//     register; a scale of 1 selects bits [31:16] of the sum, rounded with
//     bit 15 (specification).  Larger scales raise the output level.
//   * clip: the result is limited to +/-32767; a clipped sample stays valid
//     (specification).  `clip` flags such a sample.
//   * stretch: an invalid sample invalidates the next vlen-1 outputs as well,
//     so that an invalid input sample cannot leak through the filter taps.
//     vlen = 0 makes every output valid, vlen = 1 passes validity unchanged
//     (specification).
//   * delay: tick, noise diode and phase error are delayed by fdly output
//     samples (0..1023) in a 1024-entry circular buffer, to match the group
//     delay of the taps (specification).
// The 32-bit input convention and the two-register pipeline are this
// design's choices.
//
// Timing: out.stb follows in_stb by two clocks; out.d, out.v, out.tk, out.nd
// and out.pe are valid while out.stb is high and held until the next sample.
module stage_post
  import sbf_pkg::*;
(
  input  logic               clk,
  input  logic               rst,
  input  logic               in_stb,
  input  logic signed [31:0] in_x,
  input  logic               in_v,
  input  logic               in_tk,
  input  logic               in_nd,
  input  logic signed [11:0] in_pe,
  input  logic [15:0]        scale,
  input  logic [9:0]         vlen,
  input  logic [9:0]         fdly,
  output nb_t                out,
  output logic               clip
);
  // ---- delay line for tick / noise / phase error ----
  logic [13:0] dmem [1024];
  logic [9:0]  wp;
  logic [13:0] side_now, side_del;

  assign side_now = {in_tk, in_nd, in_pe};
  assign side_del = (fdly == 10'd0) ? side_now : dmem[wp - fdly];

  always_ff @(posedge clk) begin
    if (in_stb) dmem[wp] <= side_now;
  end

  // ---- invalid stretch ----
  logic [9:0] scnt;
  logic       v_str;
  always_comb begin
    if (vlen == 10'd0)   v_str = 1'b1;
    else                 v_str = in_v && (scnt == 10'd0);
  end

  // ---- pipeline ----
  logic               p_stb, p_v;
  logic signed [47:0] p_prod;
  logic [13:0]        p_side;

  always_ff @(posedge clk) begin
    if (rst) begin
      wp <= '0; scnt <= '0; p_stb <= 1'b0; p_v <= 1'b0; p_prod <= '0; p_side <= '0;
      out <= NB_IDLE; clip <= 1'b0;
    end else begin
      p_stb <= in_stb;
      if (in_stb) begin
        wp     <= wp + 10'd1;
        p_prod <= in_x * $signed({1'b0, scale});
        p_side <= side_del;
        p_v    <= v_str;
        if (!in_v && vlen != 10'd0) scnt <= vlen - 10'd1;
        else if (scnt != 10'd0)     scnt <= scnt - 10'd1;
      end
      out.stb <= p_stb;
      if (p_stb) begin
        logic signed [47:0] r;
        r = (p_prod + 48'sd32768) >>> 16;
        out.d  <= clip16(r);
        clip   <= (r > 48'sd32767) || (r < -48'sd32767);
        out.v  <= p_v;
        out.tk <= p_side[13];
        out.nd <= p_side[12];
        out.pe <= p_side[11:0];
      end
    end
  end
endmodule
