// delay2 -- narrow-band output serializer, CRCs and output delay lines (DELAY2).
//
// Turns the requantized samples from FORMAT into three 6-wire bundles:
// A (data to the Output FPGA), B (data to the VSI FPGA) and C (phase error
// to the Timing FPGA), each of 4 data wires, a tick and a sample indicator
// (SIND), and delays each bundle independently by 0..8190 clocks so that
// the outputs of filters of different bandwidths line up at the receiver.
// Following the specification:
//   * 4-bit mode (CM_CFG bit 11 = 0): a sample leaves as one nibble with
//     SIND = 1; an invalid sample is sent as the forbidden code 0x8.
//   * 8-bit mode: the sample leaves as two nibbles, LS first, with SIND high
//     on both; the tick goes with the LS nibble.  Bit 7 carries the valid
//     flag (7-bit samples), unless CM_CFG bit 14 asks for sign extension with
//     0x80 as the invalid code.
//   * Between samples (bandwidths below 128 MHz) the data wires carry a
//     filler: alternating 0x5 / 0xA for AC balance on the A output, unless
//     CM_CFG bit 13 turns that off, when the filler is the invalid code 0x8.
//   * The 8-bit phase error leaves on C as two nibbles, LS first, with CSIND
//     high on both.  At 256 Ms/s only every other sample's error is sent.
//   * A 4-bit CRC is computed over one selected wire of each delayed bundle
//     (D2_DSEL bits 1:0 choose data bit 0..3, bit 2 chooses SIND instead), per
//     tick interval, and latched at the tick for reading.  D2_ESEL bit 2 with
//     a matching wire number inverts that wire into the CRC, forcing errors.
//   * CM_CFG bit 12 replaces the FORMAT samples by an internal pseudo-random
//     source seeded by D2_SEED.
// This design's choices: the B output uses the same coding as A but always
// fills with 0x8; the pseudo-random source is a 16-bit Fibonacci LFSR
// (x^16 + x^14 + x^13 + x^11 + 1) stepped once per sample, giving the sample
// (bits 7:0) and phase error (bits 15:8); the CRC is taken after the delay
// line with the polynomial of sbf_pkg; a sample arriving while the MS
// nibble of the previous one is due replaces it.
//
// Timing: the serialized bundle appears one clock after the FORMAT strobe;
// each output then follows after its delay register value plus one clock.
module delay2
  import sbf_pkg::*;
#(
  parameter int AW = 13                 // delay line depth 2^AW clocks
) (
  input  logic              clk,
  input  logic              rst,
  input  logic              in_stb,
  input  logic signed [7:0] in_d,
  input  logic              in_v,
  input  logic              in_tk,
  input  logic signed [7:0] in_pe,
  // registers
  input  logic              mode8,
  input  logic              intgen,
  input  logic              no_acbal,
  input  logic              no_b7v,
  input  logic [2:0]        dsel,
  input  logic [2:0]        esel,
  input  logic [12:0]       adly, bdly, cdly,
  input  logic [15:0]       seed,
  // outputs
  output logic [3:0]        adata, bdata, cperr,
  output logic              atick, btick, ctick,
  output logic              asind, bsind, csind,
  output logic [11:0]       mon_crc
);
  // ---------------- pseudo-random source ----------------
  logic [15:0] lfsr;
  always_ff @(posedge clk) begin
    if (rst || !intgen) lfsr <= seed;
    else if (in_stb)    lfsr <= {lfsr[14:0], lfsr[15] ^ lfsr[13] ^ lfsr[12] ^ lfsr[10]};
  end

  logic [7:0] smp, pe;
  logic       v;
  assign smp = intgen ? lfsr[7:0]  : in_d;
  assign pe  = intgen ? lfsr[15:8] : in_pe;
  assign v   = intgen ? 1'b1       : in_v;

  // ---------------- serializer ----------------
  logic [7:0] byte_c;
  always_comb begin
    if (no_b7v) byte_c = v ? smp : 8'h80;
    else        byte_c = {v, smp[6:0]};
  end

  logic       ms_due, pms_due, fill_ph;
  logic [3:0] ms_nib, pms_nib;
  // serialized (undelayed) bundles: {data, tick, sind}
  logic [5:0] sa, sb, sc;

  always_ff @(posedge clk) begin
    if (rst) begin
      ms_due <= 1'b0; pms_due <= 1'b0; fill_ph <= 1'b0; ms_nib <= '0; pms_nib <= '0;
      sa <= '0; sb <= '0; sc <= '0;
    end else begin
      fill_ph <= ~fill_ph;
      ms_due  <= 1'b0;
      pms_due <= 1'b0;
      if (in_stb && !mode8) begin
        sa <= {v ? smp[3:0] : 4'h8, in_tk, 1'b1};
        sb <= {v ? smp[3:0] : 4'h8, in_tk, 1'b1};
      end else if (in_stb) begin
        sa <= {byte_c[3:0], in_tk, 1'b1};
        sb <= {byte_c[3:0], in_tk, 1'b1};
        ms_due <= 1'b1; ms_nib <= byte_c[7:4];
      end else if (ms_due) begin
        sa <= {ms_nib, 1'b0, 1'b1};
        sb <= {ms_nib, 1'b0, 1'b1};
      end else begin
        sa <= {(no_acbal ? 4'h8 : (fill_ph ? 4'hA : 4'h5)), 1'b0, 1'b0};
        sb <= {4'h8, 1'b0, 1'b0};
      end
      if (in_stb && !pms_due) begin
        sc <= {pe[3:0], in_tk, 1'b1};
        pms_due <= 1'b1; pms_nib <= pe[7:4];
      end else if (pms_due) begin
        sc <= {pms_nib, 1'b0, 1'b1};
      end else begin
        sc <= {4'h0, in_stb && in_tk, 1'b0};
      end
    end
  end

  // ---------------- delay lines and CRCs ----------------
  logic [5:0]  dl_in  [3];
  logic [5:0]  dl_out [3];
  logic [12:0] dl_dly [3];
  assign dl_in  = '{sa, sb, sc};
  assign dl_dly = '{adly, bdly, cdly};

  for (genvar i = 0; i < 3; i++) begin : g_line
    logic [5:0]    mem [2**AW];
    logic [AW-1:0] wp;
    logic [3:0]    crc;
    logic          bit_c;

    always_ff @(posedge clk) mem[wp] <= dl_in[i];
    always_ff @(posedge clk) begin
      if (rst) begin
        wp <= '0; dl_out[i] <= '0;
      end else begin
        wp <= wp + 1'b1;
        dl_out[i] <= (dl_dly[i] == 13'd0) ? dl_in[i] : mem[wp - AW'(dl_dly[i])];
      end
    end

    always_comb begin
      bit_c = dsel[2] ? dl_out[i][0] : dl_out[i][2 + 32'(dsel[1:0])];
      if (esel[2] && esel[1:0] == dsel[1:0]) bit_c = ~bit_c;
    end
    always_ff @(posedge clk) begin
      if (rst) begin
        crc <= '0; mon_crc[4*i +: 4] <= '0;
      end else if (dl_out[i][1]) begin
        mon_crc[4*i +: 4] <= crc;
        crc <= crc4_step(4'd0, bit_c);
      end else begin
        crc <= crc4_step(crc, bit_c);
      end
    end
  end

  assign {adata, atick, asind} = dl_out[0];
  assign {bdata, btick, bsind} = dl_out[1];
  assign {cperr, ctick, csind} = dl_out[2];
endmodule
