// format -- output formatter (FORMAT block): selection, RFI blanking, sideband
// flip, power meters, requantizer and tone extractor.
//
// The four filter stages all deliver 16-bit samples; FORMAT turns the chosen
// one into the 4- or 8-bit stream sent through DELAY2 to the correlator, and
// measures it on the way.  Following the specification, in order:
//   * FM_DSEL bits 1:0 choose the primary path (STAGE1..STAGE4 output) that
//     goes on; bits 3:2 choose a secondary path that only feeds the clip
//     counter, which counts valid samples that the chosen stage clipped.
//   * RFI blanking: a sample whose magnitude exceeds FM_BLEV is a detection
//     (valid detections are counted); it and the following samples up to
//     FM_BLEN in all are marked invalid, and a detection inside a blanked
//     interval extends it by FM_BLEN.  FM_BLEN = 0 turns blanking off.
//   * Sideband flipper (CM_CFG bit 10): every other sample is negated, which
//     mirrors the spectrum.  The alternation restarts on every second tick, or
//     on the next tick after CM_CTL bit 11 is set.
//   * Wideband power meters: sum of squares of valid samples, kept apart for
//     noise diode on and off, with the matching valid counts.
//   * Requantizer: q = (d * FM_QSCL + 2^14) >> 15 (FM_QSCL = 0x7FFF keeps the
//     scale), clipped to FM_QBIT+1 bits (+-(2^FM_QBIT - 1)); valid clipped
//     samples are counted.  The state counter counts valid quantized samples
//     equal to FM_QST and the quantized power meter sums their squares.
//   * Tone extractor (see tone_extractor).
// All counters and sums restart at the tick of their path; the values of the
// finished interval are latched for reading.  FM_IDATA holds the primary
// input sample at the last tick.  This design's choices: magnitude compare
// for blanking with "exceeds" meaning strictly greater, saturation of the
// blanking counter at 65535, and the one-register-per-step pipeline.
//
// Timing: out_stb follows the primary input strobe by four clocks.  The
// phase error leaves as its top 8 bits.
module format
  import sbf_pkg::*;
(
  input  logic               clk,
  input  logic               rst,
  input  nb_t                s_in [4],
  input  logic [3:0]         s_clip,
  // registers
  input  logic [3:0]         dsel,
  input  logic               flip_en,
  input  logic               flip_sync,
  input  logic               noupd,
  input  logic [15:0]        blev,
  input  logic [15:0]        blen,
  input  logic [15:0]        qscl,
  input  logic [2:0]         qbit,
  input  logic [7:0]         qst,
  input  logic [31:0]        tfaz,
  input  logic [31:0]        tfazr,
  input  logic               tadd_we,
  input  logic               tval_we,
  input  logic [15:0]        wdata,
  // to DELAY2
  output logic               out_stb,
  output logic signed [7:0]  out_d,
  output logic               out_v,
  output logic               out_tk,
  output logic signed [7:0]  out_pe,
  // monitor
  output logic [21:0]        ccnt,
  output logic [21:0]        bcnt,
  output logic [51:0]        pwf, pwn,
  output logic [21:0]        vcf, vcn,
  output logic [21:0]        qcc,
  output logic [21:0]        qstc,
  output logic [35:0]        qpw,
  output logic [15:0]        idata,
  output logic [15:0]        tval_rd,
  output logic [35:0]        tcos, tsin,
  output logic [21:0]        tvc
);
  nb_t p, s;
  logic sclip;
  assign p     = s_in[dsel[1:0]];
  assign s     = s_in[dsel[3:2]];
  assign sclip = s_clip[dsel[3:2]];

  // ---------------- clip counter (secondary path) ----------------
  logic [21:0] cacc;
  always_ff @(posedge clk) begin
    if (rst) begin
      cacc <= '0; ccnt <= '0;
    end else if (s.stb) begin
      if (s.tk) begin
        ccnt <= cacc; cacc <= (sclip && s.v) ? 22'd1 : 22'd0;
      end else if (sclip && s.v) cacc <= cacc + 22'd1;
    end
  end

  // ---------------- stage r: RFI blanking ----------------
  logic               r_stb, r_v, r_tk, r_nd;
  logic signed [15:0] r_d;
  logic signed [11:0] r_pe;
  logic [15:0]        bl_cnt;
  logic [21:0]        bacc;
  always_ff @(posedge clk) begin
    if (rst) begin
      r_stb <= 1'b0; r_v <= 1'b0; r_tk <= 1'b0; r_nd <= 1'b0; r_d <= '0; r_pe <= '0;
      bl_cnt <= '0; bacc <= '0; bcnt <= '0; idata <= '0;
    end else begin
      r_stb <= p.stb;
      if (p.stb) begin
        logic [15:0] mag;
        logic        det, blank;
        logic [16:0] ext;
        mag   = p.d[15] ? 16'(-p.d) : p.d;
        det   = (blen != 16'd0) && (mag > blev);
        blank = det || (bl_cnt != 16'd0);
        if (det) begin
          ext    = (bl_cnt == 16'd0) ? 17'(blen) - 17'd1 : 17'(bl_cnt) + 17'(blen);
          bl_cnt <= ext[16] ? 16'hFFFF : ext[15:0];
        end else if (bl_cnt != 16'd0) bl_cnt <= bl_cnt - 16'd1;
        if (p.tk) begin
          bcnt <= bacc; bacc <= (det && p.v) ? 22'd1 : 22'd0; idata <= p.d;
        end else if (det && p.v) bacc <= bacc + 22'd1;
        r_d <= p.d; r_v <= p.v && !blank; r_tk <= p.tk; r_nd <= p.nd; r_pe <= p.pe;
      end
    end
  end

  // ---------------- stage f: sideband flipper and power meters ----------------
  logic               f_stb, f_v, f_tk;
  logic signed [15:0] f_d;
  logic signed [11:0] f_pe;
  logic               f_ph, tk_par, sync_req;
  logic [51:0]        pf_acc, pn_acc;
  logic [21:0]        vf_acc, vn_acc;
  always_ff @(posedge clk) begin
    if (rst) begin
      f_stb <= 1'b0; f_v <= 1'b0; f_tk <= 1'b0; f_d <= '0; f_pe <= '0;
      f_ph <= 1'b0; tk_par <= 1'b0; sync_req <= 1'b0;
      pf_acc <= '0; pn_acc <= '0; vf_acc <= '0; vn_acc <= '0;
      pwf <= '0; pwn <= '0; vcf <= '0; vcn <= '0;
    end else begin
      f_stb <= r_stb;
      if (flip_sync) sync_req <= 1'b1;
      if (r_stb) begin
        logic        ph;
        logic [51:0] sq;
        ph = f_ph;
        if (r_tk) begin
          tk_par <= ~tk_par;
          if (!tk_par || sync_req || flip_sync) ph = 1'b0;
          sync_req <= 1'b0;
        end
        f_ph <= ~ph;
        f_d  <= (flip_en && ph) ? -r_d : r_d;
        f_v  <= r_v; f_tk <= r_tk; f_pe <= r_pe;
        sq = 52'(32'(r_d * r_d));
        if (r_tk) begin
          pwf <= pf_acc; pwn <= pn_acc; vcf <= vf_acc; vcn <= vn_acc;
          pf_acc <= (r_v && !r_nd) ? sq : '0;  vf_acc <= (r_v && !r_nd) ? 22'd1 : '0;
          pn_acc <= (r_v &&  r_nd) ? sq : '0;  vn_acc <= (r_v &&  r_nd) ? 22'd1 : '0;
        end else if (r_v) begin
          if (r_nd) begin pn_acc <= pn_acc + sq; vn_acc <= vn_acc + 22'd1; end
          else      begin pf_acc <= pf_acc + sq; vf_acc <= vf_acc + 22'd1; end
        end
      end
    end
  end

  // ---------------- stage q: requantizer ----------------
  logic               q_stb, q_v, q_tk;
  logic signed [7:0]  q_d;
  logic signed [11:0] q_pe;
  logic [21:0]        qc_acc;
  always_ff @(posedge clk) begin
    if (rst) begin
      q_stb <= 1'b0; q_v <= 1'b0; q_tk <= 1'b0; q_d <= '0; q_pe <= '0;
      qc_acc <= '0; qcc <= '0;
    end else begin
      q_stb <= f_stb;
      if (f_stb) begin
        logic signed [32:0] x;
        logic signed [8:0]  lim;
        logic               c;
        lim = 9'sd1 <<< qbit;
        lim = lim - 9'sd1;
        x = (33'(f_d) * $signed({17'd0, qscl}) + 33'sd16384) >>> 15;
        c = 1'b0;
        if (x > 33'(lim))       begin x = 33'(lim);  c = 1'b1; end
        else if (x < -33'(lim)) begin x = -33'(lim); c = 1'b1; end
        q_d <= x[7:0]; q_v <= f_v; q_tk <= f_tk; q_pe <= f_pe;
        if (f_tk) begin
          qcc <= qc_acc; qc_acc <= (c && f_v) ? 22'd1 : '0;
        end else if (c && f_v) qc_acc <= qc_acc + 22'd1;
      end
    end
  end

  // ---------------- state counter, quantized power, output ----------------
  logic [21:0] st_acc;
  logic [35:0] qp_acc;
  always_ff @(posedge clk) begin
    if (rst) begin
      st_acc <= '0; qp_acc <= '0; qstc <= '0; qpw <= '0;
      out_stb <= 1'b0; out_d <= '0; out_v <= 1'b0; out_tk <= 1'b0; out_pe <= '0;
    end else begin
      out_stb <= q_stb;
      if (q_stb) begin
        logic        hit;
        logic [35:0] sq;
        hit = q_v && (q_d == $signed(qst));
        sq  = q_v ? 36'(16'(q_d * q_d)) : '0;
        if (q_tk) begin
          qstc <= st_acc; qpw <= qp_acc;
          st_acc <= hit ? 22'd1 : '0; qp_acc <= sq;
        end else begin
          if (hit) st_acc <= st_acc + 22'd1;
          qp_acc <= qp_acc + sq;
        end
        out_d <= q_d; out_v <= q_v; out_tk <= q_tk; out_pe <= q_pe[11:4];
      end
    end
  end

  tone_extractor u_tone (
    .clk(clk), .rst(rst), .in_stb(q_stb), .in_d(q_d), .in_v(q_v), .in_tk(q_tk),
    .in_pe(q_pe), .faz(tfaz), .fazr(tfazr), .noupd(noupd), .tadd_we(tadd_we),
    .tval_we(tval_we), .wdata(wdata), .tval_rd(tval_rd), .tcos(tcos), .tsin(tsin),
    .tvc(tvc));
endmodule
