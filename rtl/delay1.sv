// delay1 -- sub-band geometric delay with delay-error tracking.
//
// DELAY1 delays the wideband data relative to its timing by a model delay
// (48-bit, 17 integer + 31 fraction bits, in samples at the original sample
// rate) that changes linearly with a signed 32-bit rate.  The wideband data
// arrives already delayed by the upstream Delay Module, which can only delay
// by whole samples and therefore sends its residual "delay error" (16-bit
// signed fraction of a sample, -0.5 <= e < 0.5) as a serial frame.  This block:
//   * deserializes that frame: 20 bits at 128 Mb/s (every bit lasts two
//     256 MHz clocks), LS bit first, starting with the delay-frame pulse;
//     bits 15:0 are the error, bits 19:16 must be the check pattern 0xA
//     (status event on mismatch).  Frames must start every 40 clocks (status
//     event otherwise).
//   * keeps the delay model: at the (delayed) tick the model delay and rate
//     registers are loaded, unless CM_CTL bit 2 holds them; at every later
//     data clock the rate is added to the delay.
//   * adds the Delay Module's error to the model delay and rounds the sum to
//     a whole number of samples I.  The remainder is the new delay error
//     (-0.5 .. 0.5); multiplied by the unsigned 16-bit factor D1_DEPE and
//     truncated to 12 bits it becomes the phase error sent downstream
//     (negated when CM_CFG bit 0 is set).  In VLBI mode (CM_CFG bit 7) the top
//     four bits of the new error, offset by 8, select one of sixteen
//     fractional-delay filters in STAGE1 and the phase error is zero.
//   * stores every data word, paired with the word before it, in an
//     8K x 128-bit delay line (plus valid and noise bits).  With D1_DMUX+1
//     "samples" (bits sampled at the same time) per word, I splits into a word
//     delay (I >> log2(D1_DMUX+1)) and a sample offset (I & D1_DMUX); the
//     read pair is shifted by sample offset x (64 / (D1_DMUX+1)) bits so the
//     output is delayed by whole samples, not just whole words.  A word read
//     from two stored words is valid only if both were.
//   * delays the tick by D1_TDLY data clocks; the delayed tick both leaves
//     the block and times the model update.
// The data clock enable comes from D1_DDEC (clock divider table).  All of the
// above follows the specification.  This design's choices: the delay error
// applies from the clock after its frame completes; a rate step is added at
// every data clock ("Delay rate in units of fractional samples per model
// update interval" is read as per data clock); two pipeline clocks.
//
// Timing: out_ce follows the data enable by three clocks, with data, valid, noise, tick,
// phase error and fractional-delay index for that word.
module delay1
  import sbf_pkg::*;
#(
  parameter int AW = 13            // delay line depth 2^AW words
) (
  input  logic               clk,
  input  logic               rst,
  // from INOUT
  input  logic [63:0]        in_data,
  input  logic               in_tick,
  input  logic               in_valid,
  input  logic               in_noise,
  input  logic               in_derr,
  input  logic               in_dfrm,
  // registers
  input  logic [3:0]         ddec,
  input  logic [3:0]         dmux,
  input  logic [47:0]        dly,
  input  logic [31:0]        dlyr,
  input  logic [15:0]        depe,
  input  logic [12:0]        tdly,
  input  logic               noupd,
  input  logic               vlbi,
  input  logic               perr_neg,
  // to STAGE1
  output logic               out_ce,
  output logic [63:0]        out_data,
  output logic               out_tick,
  output logic               out_valid,
  output logic               out_noise,
  output logic signed [11:0] out_pe,
  output logic [3:0]         out_frac,
  // monitor
  output logic [15:0]        mon_derr,
  output logic [11:0]        mon_perr,
  output logic [47:0]        mon_odly,
  output logic               evt_pattern,
  output logic               evt_dfrm
);
  // ---------------- delay error deserializer ----------------
  logic        dfrm_d;
  logic [5:0]  fcnt;          // clocks since the frame pulse started
  logic [5:0]  gap;           // clocks between frame starts
  logic [19:0] sh;
  logic [15:0] derr_w;
  logic        frm_seen;

  always_ff @(posedge clk) begin
    if (rst) begin
      dfrm_d <= 1'b0; fcnt <= 6'd63; gap <= '0; sh <= '0; derr_w <= '0;
      evt_pattern <= 1'b0; evt_dfrm <= 1'b0; frm_seen <= 1'b0;
    end else begin
      dfrm_d <= in_dfrm;
      evt_pattern <= 1'b0; evt_dfrm <= 1'b0;
      if (gap != 6'd63) gap <= gap + 6'd1;
      if (in_dfrm && !dfrm_d) begin
        fcnt <= 6'd1;
        sh   <= {in_derr, sh[19:1]};
        gap  <= 6'd1;
        frm_seen <= 1'b1;
        if (frm_seen && gap != 6'd40) evt_dfrm <= 1'b1;
      end else if (fcnt < 6'd40) begin
        fcnt <= fcnt + 6'd1;
        if (!fcnt[0]) sh <= {in_derr, sh[19:1]};
        if (fcnt == 6'd38) begin
          derr_w <= {in_derr, sh[19:1]} [15:0];
          if ({in_derr, sh[19:17]} != 4'hA) evt_pattern <= 1'b1;
        end
      end
    end
  end

  // ---------------- data clock enable and tick delay ----------------
  logic ce;
  ce_gen u_ce (.clk(clk), .rst(rst), .div(ddec), .sync(in_tick), .ce(ce));

  logic        tpend;
  logic [12:0] tcnt;
  logic        tick_d;
  assign tick_d = ce && ((in_tick && tdly == 13'd0) || (tpend && tcnt == 13'd1));

  always_ff @(posedge clk) begin
    if (rst) begin
      tpend <= 1'b0; tcnt <= '0;
    end else if (ce) begin
      if (in_tick && tdly != 13'd0) begin
        tpend <= 1'b1; tcnt <= tdly;
      end else if (tpend) begin
        tcnt <= tcnt - 13'd1;
        if (tcnt == 13'd1) tpend <= 1'b0;
      end
    end
  end

  // ---------------- delay model ----------------
  logic [47:0]        dmod, dcur, total;
  logic signed [31:0] rate, rcur;
  logic signed [30:0] rem;
  logic signed [15:0] nerr;
  logic [16:0]        isamp;
  logic [2:0]         slog;
  logic [16:0]        wdel;
  logic [3:0]         soff;
  logic signed [31:0] pprod;
  logic signed [15:0] perr16;

  assign dcur  = (tick_d && !noupd) ? dly : dmod;
  assign rcur  = (tick_d && !noupd) ? $signed(dlyr) : rate;
  assign total = dcur + 48'($signed({derr_w, 15'd0})) + 48'h0000_4000_0000;
  assign isamp = total[47:31];
  assign rem   = $signed(total[30:0] - 31'h4000_0000);
  assign nerr  = rem[30:15];
  assign slog  = 3'(dmux[0]) + 3'(dmux[1]) + 3'(dmux[2]) + 3'(dmux[3]);
  assign wdel  = isamp >> slog;
  assign soff  = isamp[3:0] & dmux;
  assign pprod = nerr * $signed({1'b0, depe});
  assign perr16 = perr_neg ? -pprod[31:16] : pprod[31:16];

  always_ff @(posedge clk) begin
    if (rst) begin
      dmod <= '0; rate <= '0; mon_derr <= '0; mon_perr <= '0; mon_odly <= '0;
    end else if (ce) begin
      dmod <= dcur + 48'(rcur);
      rate <= rcur;
      if (tick_d) begin
        mon_derr <= derr_w;
        mon_perr <= vlbi ? 12'd0 : perr16[15:4];
        mon_odly <= total;
      end
    end
  end

  // ---------------- delay line ----------------
  localparam int MW = 64 + 64 + 3;
  logic [MW-1:0]  mem [2**AW];
  logic [AW-1:0]  wp;
  logic [63:0]    prev;
  logic           prev_v;

  always_ff @(posedge clk) begin
    if (ce) mem[wp] <= {prev, in_data, prev_v, in_valid, in_noise};
  end

  // stage a: model result for this word
  logic               a_ce, a_tk;
  logic [AW-1:0]      a_wdel;
  logic [3:0]         a_soff;
  logic signed [11:0] a_pe;
  logic [3:0]         a_frac;
  logic [6:0]         a_bits;
  // stage b: read word pair
  logic               b_ce, b_tk;
  logic [MW-1:0]      b_pair;
  logic [3:0]         b_soff;
  logic signed [11:0] b_pe;
  logic [3:0]         b_frac;
  logic [6:0]         b_bits;

  always_ff @(posedge clk) begin
    if (rst) begin
      wp <= '0; prev <= '0; prev_v <= 1'b0;
      a_ce <= 1'b0; a_tk <= 1'b0; a_wdel <= '0; a_soff <= '0; a_pe <= '0; a_frac <= '0; a_bits <= '0;
      b_ce <= 1'b0; b_tk <= 1'b0; b_pair <= '0; b_soff <= '0; b_pe <= '0; b_frac <= '0; b_bits <= '0;
      out_ce <= 1'b0; out_data <= '0; out_tick <= 1'b0; out_valid <= 1'b0; out_noise <= 1'b0;
      out_pe <= '0; out_frac <= '0;
    end else begin
      if (ce) begin
        wp <= wp + 1'b1; prev <= in_data; prev_v <= in_valid;
      end
      a_ce <= ce;
      if (ce) begin
        a_tk   <= tick_d;
        a_wdel <= (wdel > 17'(2**AW - 1)) ? AW'(2**AW - 1) : wdel[AW-1:0];
        a_soff <= soff;
        a_pe   <= vlbi ? 12'sd0 : perr16[15:4];
        a_frac <= {~nerr[15], nerr[14:12]};
        a_bits <= 7'(7'd64 >> slog);
      end
      b_ce <= a_ce;
      if (a_ce) begin
        b_pair <= mem[wp - 1'b1 - a_wdel];
        b_tk <= a_tk; b_soff <= a_soff; b_pe <= a_pe; b_frac <= a_frac;
        b_bits <= a_bits;
      end
      out_ce <= b_ce;
      if (b_ce) begin
        logic [127:0] pair;
        pair = b_pair[MW-1:3] >> (32'(b_soff) * 32'(b_bits));
        out_data  <= pair[63:0];
        out_valid <= (b_soff == 4'd0) ? b_pair[1] : (b_pair[1] && b_pair[2]);
        out_noise <= b_pair[0];
        out_tick  <= b_tk;
        out_pe    <= b_pe;
        out_frac  <= b_frac;
      end
    end
  end
endmodule
