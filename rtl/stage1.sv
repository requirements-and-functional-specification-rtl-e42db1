// stage1 -- first decimating filter: 4096 Ms/s (as 256 Mword/s) down to 256 Ms/s.
//
// A 64-bit input word holds 16 consecutive 4-bit samples, or 8 consecutive
// 8-bit samples (other organizations exist: several bands per word).  A
// 16 x 16 crossbar of 4-bit lanes routes any input nibble to any of sixteen
// 32-tap look-up-table filters (fir32).  How their 16 sums are combined
// depends on the mode (all three come from the specification):
//   * 4-bit mode: the sum of all sixteen is one output of a 512-tap
//     poly-phase filter decimating by 16.
//   * 8-bit mode: the MS nibbles go to filters 8..15 and the LS nibbles to
//     filters 0..7; the final sum is (upper sum << 4) + lower sum, a 256-tap
//     poly-phase filter decimating by 8.
//   * VLBI mode (CM_CFG bit 7): the sixteen filters are independent 32-tap
//     filters, each loaded with a different fractional-sample delay; the
//     4-bit fractional delay from DELAY1 (or S1_FBIT when CM_CTL bit 4 is
//     set) picks one of them.
// The chosen sum is left-justified into 32 bits ("pad with LS 0s"), a 32-bit
// DC offset (S1_IDC) is added, the valid results are summed (48 bits) and
// counted (22 bits) between ticks for the DC offset estimate (S1_ODC,
// S1_VDC), and the common output block scales, rounds, clips, stretches
// invalids and delays the side signals.  The output strobe is the input data
// enable further decimated by S1_DDEC (Table of clock dividers).  The
// product tables are loaded through the chain described in fir32: the chain
// runs from filter 15 (input, S1_CVAL writes) to filter 0 (read back).
//
// This design's choices: pipeline registers (four clocks from input enable
// to the output block), the single-adder combination instead of the DSP48
// systolic chain, and accumulating validity and tick over the decimation
// window.
//
// Timing: the output bundle `out` is produced 6 clocks after the input
// enable of the last sample it contains.
module stage1
  import sbf_pkg::*;
#(
  parameter int NBIT = 12
) (
  input  logic               clk,
  input  logic               rst,
  // from DELAY1
  input  logic               in_ce,
  input  logic [63:0]        in_data,
  input  logic               in_tk,
  input  logic               in_v,
  input  logic               in_nd,
  input  logic signed [11:0] in_pe,
  input  logic [3:0]         in_frac,
  // configuration
  input  logic               mode8,
  input  logic               vlbi,
  input  logic               load,
  input  logic               fbit_en,
  input  logic [3:0]         fbit,
  input  logic [63:0]        xbar,
  input  logic [3:0]         cadd,
  input  logic               cval_we,
  input  logic [NBIT-1:0]    cval,
  input  logic [3:0]         ddec,
  input  logic [9:0]         vlen,
  input  logic [9:0]         fdly,
  input  logic [15:0]        scale,
  input  logic [31:0]        idc,
  // results
  output nb_t                out,
  output logic               clip,
  output logic [NBIT-1:0]    cval_rd,
  output logic [47:0]        odc,
  output logic [21:0]        vdc
);
  localparam int SW = NBIT + 5;     // one fir32 sum
  localparam int PAD = 32 - (NBIT + 13);

  // ---------------- crossbar and filters ----------------
  logic [3:0]           lane [16];
  logic signed [SW-1:0] fsum [16];
  logic [NBIT-1:0]      chain [17];

  assign chain[16] = cval;
  assign cval_rd   = chain[0];

  for (genvar k = 0; k < 16; k++) begin : g_fir
    assign lane[k] = in_data[4*xbar[4*k +: 4] +: 4];
    fir32 #(.NBIT(NBIT)) u_fir (
      .clk(clk), .ce(in_ce), .din(lane[k]), .mcbi_data(cadd), .sel(load),
      .we(cval_we && load), .product_in(chain[k+1]), .product_out(chain[k]),
      .sum(fsum[k]));
  end

  // ---------------- output decimation ----------------
  logic ce_dec, out_ce;
  ce_gen u_ce (.clk(clk), .rst(rst), .div(ddec), .sync(in_ce && in_tk), .ce(ce_dec));
  assign out_ce = in_ce && ce_dec;

  // validity and tick over the decimation window
  logic v_acc, tk_acc;
  always_ff @(posedge clk) begin
    if (rst) begin
      v_acc <= 1'b1; tk_acc <= 1'b0;
    end else if (in_ce) begin
      if (out_ce) begin v_acc <= 1'b1; tk_acc <= 1'b0; end
      else begin v_acc <= v_acc && in_v; tk_acc <= tk_acc || in_tk; end
    end
  end

  // side-signal pipeline: [0] taps updated, [1] fir sums, [2] combined, [3] DC stage
  logic [3:0]        p_stb;
  logic [3:0]        p_v, p_tk, p_nd;
  logic signed [11:0] p_pe [4];
  logic [3:0]        p_frac [4];

  always_ff @(posedge clk) begin
    if (rst) begin
      p_stb <= '0; p_v <= '0; p_tk <= '0; p_nd <= '0;
      for (int i = 0; i < 4; i++) begin p_pe[i] <= '0; p_frac[i] <= '0; end
    end else begin
      p_stb <= {p_stb[2:0], out_ce};
      p_v   <= {p_v[2:0],  v_acc && in_v};
      p_tk  <= {p_tk[2:0], tk_acc || in_tk};
      p_nd  <= {p_nd[2:0], in_nd};
      p_pe[0]   <= in_pe;
      p_frac[0] <= fbit_en ? fbit : in_frac;
      for (int i = 1; i < 4; i++) begin p_pe[i] <= p_pe[i-1]; p_frac[i] <= p_frac[i-1]; end
    end
  end

  // ---------------- combination (registered) ----------------
  logic signed [31:0] comb_x;
  always_ff @(posedge clk) begin
    logic signed [NBIT+8:0]  lo, hi;
    logic signed [NBIT+12:0] tot;
    lo = '0; hi = '0;
    for (int k = 0; k < 8; k++) begin
      lo = lo + (NBIT+9)'(fsum[k]);
      hi = hi + (NBIT+9)'(fsum[k+8]);
    end
    if (mode8) tot = ((NBIT+13)'(hi) <<< 4) + (NBIT+13)'(lo);
    else       tot = (NBIT+13)'(hi) + (NBIT+13)'(lo);
    if (vlbi) comb_x <= 32'(fsum[p_frac[1]]) <<< (32 - SW);
    else      comb_x <= 32'(tot) <<< PAD;
  end

  // ---------------- DC offset removal and measurement ----------------
  logic signed [31:0] dc_x;
  logic signed [47:0] odc_acc;
  logic [21:0]        vdc_acc;
  always_ff @(posedge clk) begin
    if (rst) begin
      dc_x <= '0; odc_acc <= '0; vdc_acc <= '0; odc <= '0; vdc <= '0;
    end else begin
      dc_x <= comb_x + $signed(idc);
      if (p_stb[3]) begin
        if (p_tk[3]) begin
          odc <= odc_acc; vdc <= vdc_acc;
          odc_acc <= p_v[3] ? 48'(dc_x) : '0;
          vdc_acc <= p_v[3] ? 22'd1 : '0;
        end else if (p_v[3]) begin
          odc_acc <= odc_acc + 48'(dc_x);
          vdc_acc <= vdc_acc + 22'd1;
        end
      end
    end
  end

  stage_post u_post (
    .clk(clk), .rst(rst), .in_stb(p_stb[3]), .in_x(dc_x), .in_v(p_v[3]),
    .in_tk(p_tk[3]), .in_nd(p_nd[3]), .in_pe(vlbi ? 12'sd0 : p_pe[3]),
    .scale(scale), .vlen(vlen), .fdly(fdly), .out(out), .clip(clip));
endmodule
