// inout_io -- wideband input/output ports of the Filter FPGA (INOUT block).
//
// The Filter FPGAs of a filter bank form a daisy chain: each receives the
// 64-bit wideband data with its side signals (valid, noise diode, tick,
// serial delay error and its frame pulse) from the previous FPGA and
// re-transmits it to the next, re-timed by the local 256 MHz clock so that
// clock jitter does not accumulate.  There are two input and two output
// ports to ease board routing.  This block, following the specification:
//   * captures both input ports with the rising or the falling edge of the
//     256 MHz clock (CM_CFG bit 5) and selects port A or B (CM_CFG bit 1);
//   * drives each output port, when enabled (CM_CFG bits 2 and 3), with the
//     selected input re-registered; a disabled port holds all zeros;
//   * generates the 128 MHz forwarded clock as an even/odd toggle;
//   * computes a 4-bit CRC over one selected input wire per tick interval
//     (IO_DSEL; with bit 6 set, wires 0..4 are VALID, NOISE, DERR, DFRM and
//     the input clock) with optional error injection (IO_ESEL bit 6 and a
//     matching wire number), latched at the tick for reading (IO_CRC);
//   * captures the system tick STICK with the edge chosen by CM_CFG bit 4,
//     delays it by IO_SDLY clocks and runs a time interval counter between
//     the data tick and the system tick; IO_TINT1 bits 15:14 choose the
//     interval: 00 data tick to system tick, 01 data tick period, 10 system
//     tick period, 11 system tick to data tick;
//   * reports, for test, whether the STICK rise seen with the rising and the
//     falling clock edge matches (CM_STS bit 8) and whether the chosen edge
//     leads the other (bit 9).
// This design's choices: the CRC generator polynomial (x^4 + x + 1, see
// sbf_pkg), a 22-bit interval counter that saturates, the STICK width check
// (the pulse may last at most two 256 MHz clocks, one cycle of the 128 MHz
// system clock), the pairing of each rising-edge STICK sample with the
// falling-edge sample half a clock later for the edge comparison, and the one-pulse-at-a-time tick delay counter.
//
// Timing: the selected input reaches the `d_*` outputs two clocks after
// capture (one capture register, one re-timing register); the output ports
// are registered from the same re-timed signals, two clocks after capture.
module inout_io (
  input  logic        clk,
  input  logic        rst,
  input  logic [63:0] idata_a, idata_b,
  input  logic        itick_a, itick_b,
  input  logic        ivalid_a, ivalid_b,
  input  logic        inoise_a, inoise_b,
  input  logic        iderr_a, iderr_b,
  input  logic        idfrm_a, idfrm_b,
  input  logic        iclk_a, iclk_b,
  input  logic        stick,
  // configuration
  input  logic        sel_b,
  input  logic        en_a, en_b,
  input  logic        data_edge,
  input  logic        stick_edge,
  input  logic [6:0]  esel, dsel,
  input  logic [15:0] sdly,
  input  logic [1:0]  tmode,
  // outputs to the next FPGA
  output logic [63:0] odata_a, odata_b,
  output logic        otick_a, otick_b,
  output logic        ovalid_a, ovalid_b,
  output logic        onoise_a, onoise_b,
  output logic        oderr_a, oderr_b,
  output logic        odfrm_a, odfrm_b,
  output logic        oclk_a, oclk_b,
  // to DELAY1
  output logic [63:0] d_data,
  output logic        d_tick, d_valid, d_noise, d_derr, d_dfrm,
  // monitor
  output logic [3:0]  mon_crc,
  output logic [21:0] mon_tint,
  output logic        evt_stick_width,
  output logic        evt_stick_match,   // both edges see the STICK rise in the same clock
  output logic        evt_stick_lead     // the chosen edge sees it a clock before the other
);
  typedef struct packed {
    logic [63:0] data;
    logic tick, valid, noise, derr, dfrm, iclk;
  } wb_t;

  wb_t in_a, in_b, cap_p, cap_n, cap_sel, cur;
  assign in_a = '{data: idata_a, tick: itick_a, valid: ivalid_a, noise: inoise_a,
                  derr: iderr_a, dfrm: idfrm_a, iclk: iclk_a};
  assign in_b = '{data: idata_b, tick: itick_b, valid: ivalid_b, noise: inoise_b,
                  derr: iderr_b, dfrm: idfrm_b, iclk: iclk_b};

  // capture with both edges, then choose edge and port
  always_ff @(posedge clk) cap_p <= sel_b ? in_b : in_a;
  always_ff @(negedge clk) cap_n <= sel_b ? in_b : in_a;
  assign cap_sel = data_edge ? cap_n : cap_p;

  logic oclk_t;
  always_ff @(posedge clk) begin
    if (rst) begin
      cur <= '0; oclk_t <= 1'b0;
      {odata_a, otick_a, ovalid_a, onoise_a, oderr_a, odfrm_a} <= '0;
      {odata_b, otick_b, ovalid_b, onoise_b, oderr_b, odfrm_b} <= '0;
    end else begin
      cur    <= cap_sel;
      oclk_t <= ~oclk_t;
      if (en_a) {odata_a, otick_a, ovalid_a, onoise_a, oderr_a, odfrm_a} <=
                  {cur.data, cur.tick, cur.valid, cur.noise, cur.derr, cur.dfrm};
      else      {odata_a, otick_a, ovalid_a, onoise_a, oderr_a, odfrm_a} <= '0;
      if (en_b) {odata_b, otick_b, ovalid_b, onoise_b, oderr_b, odfrm_b} <=
                  {cur.data, cur.tick, cur.valid, cur.noise, cur.derr, cur.dfrm};
      else      {odata_b, otick_b, ovalid_b, onoise_b, oderr_b, odfrm_b} <= '0;
    end
  end
  assign oclk_a = en_a & oclk_t;
  assign oclk_b = en_b & oclk_t;

  assign d_data  = cur.data;
  assign d_tick  = cur.tick;
  assign d_valid = cur.valid;
  assign d_noise = cur.noise;
  assign d_derr  = cur.derr;
  assign d_dfrm  = cur.dfrm;

  // ---------------- CRC of one wire ----------------
  logic       wire_bit;
  logic [3:0] crc;
  always_comb begin
    wire_bit = cur.data[dsel[5:0]];
    if (dsel[6]) begin
      case (dsel[5:0])
        6'd0: wire_bit = cur.valid;
        6'd1: wire_bit = cur.noise;
        6'd2: wire_bit = cur.derr;
        6'd3: wire_bit = cur.dfrm;
        6'd4: wire_bit = cur.iclk;
        default: ;
      endcase
    end
    if (esel[6] && esel[5:0] == dsel[5:0]) wire_bit = ~wire_bit;
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      crc <= '0; mon_crc <= '0;
    end else if (cur.tick) begin
      mon_crc <= crc;
      crc     <= crc4_first(wire_bit);
    end else begin
      crc <= sbf_pkg::crc4_step(crc, wire_bit);
    end
  end

  function automatic logic [3:0] crc4_first(input logic b);
    return sbf_pkg::crc4_step(4'd0, b);
  endfunction

  // ---------------- system tick ----------------
  logic stk_p, stk_n, stk;
  always_ff @(posedge clk) stk_p <= stick;
  always_ff @(negedge clk) stk_n <= stick;

  logic        stk_d1, spend;
  logic [15:0] scnt;
  logic [1:0]  swidth;
  logic        stick_del;

  always_ff @(posedge clk) begin
    if (rst) begin
      stk <= 1'b0; stk_d1 <= 1'b0; spend <= 1'b0; scnt <= '0; swidth <= '0;
      evt_stick_width <= 1'b0;
    end else begin
      stk    <= stick_edge ? stk_n : stk_p;
      stk_d1 <= stk;
      evt_stick_width <= 1'b0;
      if (stk) begin
        if (swidth != 2'd3) swidth <= swidth + 2'd1;
        if (swidth == 2'd2) evt_stick_width <= 1'b1;
      end else swidth <= '0;
      if (stk && !stk_d1 && sdly != 16'd0) begin
        spend <= 1'b1; scnt <= sdly;
      end else if (spend) begin
        scnt <= scnt - 16'd1;
        if (scnt == 16'd1) spend <= 1'b0;
      end
    end
  end
  assign stick_del = (stk && !stk_d1 && sdly == 16'd0) || (spend && scnt == 16'd1);

  // edge comparison: the falling-edge sample is taken half a clock after the
  // rising-edge one, so it sees a STICK rise in the same clock or one before
  logic sp_r, sn_r;
  always_ff @(posedge clk) begin
    if (rst) begin
      sp_r <= 1'b0; sn_r <= 1'b0; evt_stick_match <= 1'b0; evt_stick_lead <= 1'b0;
    end else begin
      sp_r <= stk_p;
      sn_r <= stk_n;
      evt_stick_match <= stk_p && !sp_r && stk_n && !sn_r;
      evt_stick_lead  <= stick_edge ? (stk_n && !sn_r && !stk_p) : (stk_p && !sp_r && !stk_n);
    end
  end

  // ---------------- time interval counter ----------------
  logic        dtick_r, start_p, stop_p, running;
  logic [21:0] tcnt;
  always_ff @(posedge clk) dtick_r <= rst ? 1'b0 : cur.tick;

  always_comb begin
    logic dt;
    dt = cur.tick && !dtick_r;
    case (tmode)
      2'b00: begin start_p = dt;        stop_p = stick_del; end
      2'b01: begin start_p = dt;        stop_p = dt;        end
      2'b10: begin start_p = stick_del; stop_p = stick_del; end
      default: begin start_p = stick_del; stop_p = dt;    end
    endcase
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      running <= 1'b0; tcnt <= '0; mon_tint <= '0;
    end else begin
      if (running && stop_p) begin
        mon_tint <= tcnt;
        running  <= start_p;   // period modes restart at once
        tcnt     <= 22'd1;
      end else if (start_p && !running) begin
        running <= 1'b1; tcnt <= 22'd1;
      end else if (running && tcnt != 22'h3F_FFFF) begin
        tcnt <= tcnt + 22'd1;
      end
    end
  end
endmodule
