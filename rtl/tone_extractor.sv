// tone_extractor -- correlates the quantized output with a modelled tone.
//
// Used to measure the amplitude and phase of an injected calibration tone
// (normally for VLBI).  A 32-bit phase accumulator (fraction of a cycle)
// advances by the tone phase rate at every output sample; at a tick it is
// reloaded with FM_TFAZ / FM_TFAZR unless CM_CTL bit 10 holds the model.  The
// sample's 12-bit phase error is added at bits [31:20].  The top 8 bits
// address a 256-entry table whose entries hold cos (bits 15:8) and sin (bits
// 7:0) as signed 8-bit values for phase n/256 cycle.  Each valid quantized
// sample (8-bit) is multiplied by both and accumulated; valid samples are
// counted.  At every tick the two 36-bit sums and the 22-bit count of the
// finished interval are latched for reading and the accumulation restarts
// with the tick sample.  Table, widths and register use follow the
// specification; the phase-error position and the table write pointer
// (set by FM_TADD, advanced by each FM_TVAL write) are this design's
// reading of it.
//
// Timing: two pipeline clocks from in_stb to the accumulators.
module tone_extractor (
  input  logic               clk,
  input  logic               rst,
  input  logic               in_stb,
  input  logic signed [7:0]  in_d,
  input  logic               in_v,
  input  logic               in_tk,
  input  logic signed [11:0] in_pe,
  input  logic [31:0]        faz,
  input  logic [31:0]        fazr,
  input  logic               noupd,
  input  logic               tadd_we,
  input  logic               tval_we,
  input  logic [15:0]        wdata,
  output logic [15:0]        tval_rd,
  output logic [35:0]        tcos,
  output logic [35:0]        tsin,
  output logic [21:0]        tvc
);
  logic [15:0] lut [256];
  logic [7:0]  wa;

  always_ff @(posedge clk) begin
    if (rst)          wa <= '0;
    else if (tadd_we) wa <= wdata[7:0];
    else if (tval_we) wa <= wa + 8'd1;
  end
  always_ff @(posedge clk) if (tval_we) lut[wa] <= wdata;
  assign tval_rd = lut[wa];

  logic [31:0] phase, rate, ph_now, ph_used;
  assign ph_now  = (in_tk && !noupd) ? faz : phase;
  assign ph_used = ph_now + {in_pe, 20'd0};

  always_ff @(posedge clk) begin
    if (rst) begin
      phase <= '0; rate <= '0;
    end else if (in_stb) begin
      if (in_tk && !noupd) begin phase <= faz + fazr; rate <= fazr; end
      else                 phase <= phase + rate;
    end
  end

  logic              a_stb, a_v, a_tk;
  logic signed [7:0] a_d;
  logic [7:0]        a_addr;
  logic signed [35:0] acc_c, acc_s;
  logic [21:0]        acc_n;

  always_ff @(posedge clk) begin
    if (rst) begin
      a_stb <= 1'b0; a_v <= 1'b0; a_tk <= 1'b0; a_d <= '0; a_addr <= '0;
      acc_c <= '0; acc_s <= '0; acc_n <= '0; tcos <= '0; tsin <= '0; tvc <= '0;
    end else begin
      a_stb <= in_stb;
      if (in_stb) begin
        a_d <= in_d; a_v <= in_v; a_tk <= in_tk; a_addr <= ph_used[31:24];
      end
      if (a_stb) begin
        logic signed [15:0] pc, ps;
        logic [15:0]        e;
        e  = lut[a_addr];
        pc = a_v ? a_d * $signed(e[15:8]) : 16'sd0;
        ps = a_v ? a_d * $signed(e[7:0])  : 16'sd0;
        if (a_tk) begin
          tcos <= acc_c; tsin <= acc_s; tvc <= acc_n;
          acc_c <= 36'(pc); acc_s <= 36'(ps); acc_n <= a_v ? 22'd1 : 22'd0;
        end else begin
          acc_c <= acc_c + 36'(pc); acc_s <= acc_s + 36'(ps);
          if (a_v) acc_n <= acc_n + 22'd1;
        end
      end
    end
  end
endmodule
