// tb_sbf_top -- end-to-end testbench for sbf_top (shortened delay lines).
//
// Drives the whole Filter FPGA as the board does: random wideband words on
// input port A with a data tick every TP clocks, the system tick STICK, and
// register accesses over the MCB bus from an unrelated 20 MHz clock.  Each
// mechanism below is checked and counted; a mechanism that never happened
// counts as a failure at the end:
//    0 register write/read back and design identifier
//    1 wideband pass-through to output port A (three clocks)
//    2 narrow-band samples leave on A with SIND, one per clock from STAGE1
//    3 decimation: fewer samples per tick through STAGE2 with S2_DDEC set, and
//      the exact sample count of every decimation 2^1..2^11 of STAGE2..STAGE4
//    4 8-bit output: two SIND nibbles per sample
//    5 internal test source: B carries the same sample nibbles as A
//    6 DELAY2 delay: BTICK follows ATICK by the difference of the delays
//    7 input CRC with error injection (zero wire gives CRC 0, inverted not)
//    8 status: a too-long STICK pulse sets CM_STS bit 1 at the next tick
//    9 error register: a write to a read-only register sets CM_ERR bit 0
//   10 test port shows the selected probe (ATICK)
//   11 time interval counter measures the data tick period
//   12 power meter valid counts of FORMAT cover the tick interval
//   13 software reset silences the narrow-band output for a moment
//   14 clock-manager handshake: phase-shift enable out, done into CM_STS
//   15 RFI blanking: a STAGE1 DC offset above the blanking level is detected
//      on every valid sample, counted, and no valid sample is left
// The run ends with the TB_RESULT line; a watchdog stops a hung run.
`timescale 1ns / 10ps
module tb_sbf_top;
  import sbf_pkg::*;
  localparam int TP = 2048;
  localparam int NM = 16;

  logic sclk = 1'b0, rst_n = 1'b0;
  always #1.953 sclk = ~sclk;
  logic mcb_clk = 1'b0;
  always #25 mcb_clk = ~mcb_clk;

  logic [63:0] idata_a = '0, idata_b = '0;
  logic itick_a = 0, itick_b = 0, ivalid_a = 1, ivalid_b = 0, inoise_a = 0, inoise_b = 0;
  logic iderr_a = 0, iderr_b = 0, idfrm_a = 0, idfrm_b = 0, iclk_a = 0, iclk_b = 0, stick = 0;
  logic [63:0] odata_a, odata_b;
  logic otick_a, otick_b, ovalid_a, ovalid_b, onoise_a, onoise_b, oderr_a, oderr_b;
  logic odfrm_a, odfrm_b, oclk_a, oclk_b;
  logic [3:0] adata, bdata, cperr, tst;
  logic atick, btick, ctick, asind, bsind, csind;
  logic mcb_cs_n = 1, mcb_rd_wr_n = 1, mcb_oe;
  logic [7:0] mcb_addr = '0;
  logic [15:0] mcb_data_i = '0, mcb_data_o;
  logic dcm_locked = 1, dcm_ps_done = 0, dcm_ps_ovf = 0, dcm_ps_inc, dcm_ps_en, dcm_rst;

  sbf_top #(.D1_AW(8), .D2_AW(8)) dut (.*);

  int checks = 0, failures = 0;
  int mech [NM];
  task automatic check(input bit ok, input int m, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL %s at %0t", what, $time);
    end else if (m >= 0) mech[m]++;
  endtask

  // ---------------- wideband source and monitors ----------------
  longint cyc = 0;
  bit zero_bit0 = 0, pass_chk = 0;
  logic [63:0] hist [$];
  int n_asind, n_atick, n_tst, quiet_run, max_quiet;
  longint last_atick, last_btick;
  bit ab_same = 1;
  int ab_cmp;

  always @(posedge sclk) begin
    #0.5;
    if (pass_chk && hist.size() >= 3) check(odata_a == hist[hist.size() - 3], 1, "pass-through");
    cyc++;
    idata_a = {$urandom, $urandom};
    if (zero_bit0) idata_a[0] = 1'b0;
    itick_a = (cyc % TP) == 0;
    inoise_a = (cyc % TP) < TP / 2;
    hist.push_back(idata_a);
    if (hist.size() > 4) void'(hist.pop_front());
    if (asind) n_asind++;
    if (atick) begin n_atick++; last_atick = cyc; end
    if (btick) last_btick = cyc;
    if (tst[0]) n_tst++;
    if (asind) quiet_run = 0; else quiet_run++;
    if (quiet_run > max_quiet) max_quiet = quiet_run;
  end

  // ---------------- MCB bus ----------------
  task automatic wr(input logic [7:0] a, input logic [15:0] d);
    @(negedge mcb_clk);
    mcb_cs_n = 0; mcb_rd_wr_n = 0; mcb_addr = a; mcb_data_i = d;
    @(negedge mcb_clk);
    mcb_cs_n = 1; mcb_rd_wr_n = 1;
    @(negedge mcb_clk);
  endtask
  task automatic rd(input logic [7:0] a, output logic [15:0] d);
    @(negedge mcb_clk);
    mcb_cs_n = 0; mcb_rd_wr_n = 1; mcb_addr = a;
    @(negedge mcb_clk);
    d = mcb_data_o;
    mcb_cs_n = 1;
    @(negedge mcb_clk);
  endtask
  task automatic wait_ticks(input int n);
    repeat (n * TP) @(posedge sclk);
  endtask
  // count A samples and ticks over whole tick intervals
  task automatic count_a(input int n, output int samples);
    int t0;
    t0 = n_atick;
    while (n_atick == t0) @(posedge sclk);
    n_asind = 0; t0 = n_atick;
    while (n_atick < t0 + n) @(posedge sclk);
    samples = n_asind;
  endtask

  localparam logic [15:0] OUT_A = 16'h0004;

  initial begin
    logic [15:0] d, c0, c1;
    int n0, n1, n8;
    foreach (mech[i]) mech[i] = 0;
    n_asind = 0; n_atick = 0; n_tst = 0; quiet_run = 0; max_quiet = 0;
    last_atick = 0; last_btick = 0; ab_cmp = 0;
    repeat (10) @(posedge sclk);
    rst_n = 1;
    repeat (10) @(posedge sclk);
    // 0: registers
    rd(A_CM_DID, d);      check(d == 16'h2511, 0, "DID");
    wr(A_FM_BLEV, 16'h1234);
    rd(A_FM_BLEV, d);     check(d == 16'h1234, 0, "readback");
    // enable output port A; STAGE1 output, 4-bit
    wr(A_CM_CFG, OUT_A);
    wr(A_FM_DSEL, 16'h0000);
    wr(A_IO_TINT1, 16'h4000);                   // tick period mode
    repeat (20) @(posedge sclk);
    pass_chk = 1;
    wait_ticks(3);
    count_a(2, n0);
    check(n0 > TP && n0 <= 2 * TP, 2, "stage1 sample count");
    // 11: tick period
    rd(A_IO_TINT0, d);    check(d == 16'(TP), 11, "tick period");
    // 12: power meter valid counts
    begin
      logic [15:0] f, n;
      rd(A_FM_VCF0, f); rd(A_FM_VCN0, n);
      check(int'(f) + int'(n) > 0 && int'(f) + int'(n) <= TP, 12, "valid counts");
    end
    // 15: RFI blanking of a constant level made with the STAGE1 DC offset
    wr(A_S1_IDC1, 16'h0100);                    // 2^24 before scaling: 256 after
    wr(A_FM_BLEV, 16'd100);
    wr(A_FM_BLEN, 16'd1);
    wait_ticks(3);
    begin
      logic [15:0] b, f, n;
      rd(A_FM_BCNT0, b); rd(A_FM_VCF0, f); rd(A_FM_VCN0, n);
      check(b > 0 && f == 0 && n == 0, 15, "blanking");
    end
    wr(A_FM_BLEN, 16'd0);
    wr(A_S1_IDC1, 16'h0000);
    // 10: test port on ATICK
    wr(A_CM_TST0, 16'd24);
    n_tst = 0; wait_ticks(2);
    check(n_tst >= 1 && n_tst <= 4, 10, "test port");
    // 3: decimation through STAGE2
    wr(A_S2_NTAP, 16'd63);               // 64 taps: two steps of 32
    wr(A_S2_DDEC, 16'd2);
    wr(A_FM_DSEL, 16'h0001);
    wait_ticks(2);
    count_a(2, n1);
    check(n1 > 0 && n1 * 2 <= n0, 3, "decimation");
    // the output bandwidths of STAGE2..STAGE4: 2 * TP / 2^DDEC samples in
    // two tick intervals, 64-tap filters, each stage fed at its full rate
    wr(A_S3_NTAP, 16'd63); wr(A_S4_NTAP, 16'd63);
    for (int dd = 1; dd <= 11; dd++) begin
      int nb;
      if (dd <= 4) begin
        wr(A_S2_DDEC, 16'(dd)); wr(A_FM_DSEL, 16'h0001);
      end else if (dd <= 8) begin
        wr(A_S2_DDEC, 16'd4); wr(A_S3_DDEC, 16'(dd)); wr(A_FM_DSEL, 16'h0002);
      end else begin
        wr(A_S3_DDEC, 16'd8); wr(A_S4_DDEC, 16'(dd)); wr(A_FM_DSEL, 16'h0003);
      end
      wait_ticks(2);
      count_a(2, nb);
      $display("DDEC %0d: %0d samples in two ticks", dd, nb);
      check(nb == (2 * TP) >> dd, 3, "bandwidth sample count");
    end
    wr(A_S2_DDEC, 16'd2); wr(A_FM_DSEL, 16'h0001);
    // 4: 8-bit output, two nibbles per sample
    wr(A_CM_CFG, OUT_A | 16'h0800);
    wait_ticks(2);
    count_a(2, n8);
    check(n8 == 2 * n1, 4, "8-bit nibbles");
    // 5 and 6: internal source on A and B, B delayed by 40 clocks more
    wr(A_D2_ADLY, 16'd10); wr(A_D2_BDLY, 16'd50);
    wr(A_CM_CFG, OUT_A | 16'h1000);
    wait_ticks(2);
    for (int i = 0; i < 3; i++) begin
      longint ta;
      @(posedge atick); ta = cyc;
      @(posedge btick);
      check(cyc - ta == 40, 6, "delay difference");
    end
    // B repeats A forty clocks later while both carry samples
    begin
      logic [4:0] aq [$];
      logic [4:0] e;
      int same, tot;
      same = 0; tot = 0;
      for (int i = 0; i < 400; i++) begin
        @(posedge sclk); #0.6;
        aq.push_back({adata, asind});
        if (aq.size() > 40) begin
          e = aq.pop_front();
          if (e[0]) begin
            tot++;
            if ({bdata, bsind} == e) same++;
          end
        end
      end
      check(tot > 0 && same == tot, 5, "B follows A");
    end
    wr(A_CM_CFG, OUT_A);
    wr(A_D2_ADLY, 16'd0); wr(A_D2_BDLY, 16'd0);
    // 7: input CRC of a zero wire, then with error injection
    zero_bit0 = 1;
    wr(A_IO_DSEL, 16'd0);
    wait_ticks(2);
    rd(A_IO_CRC, c0);
    check(c0 == 16'd0, 7, "crc of zero wire");
    wr(A_IO_ESEL, 16'h0040);
    wait_ticks(2);
    rd(A_IO_CRC, c1);
    check(c1 != 16'd0, 7, "crc with injection");
    wr(A_IO_ESEL, 16'h0000);
    zero_bit0 = 0;
    // 8: a STICK pulse of four clocks
    @(posedge sclk); #0.6 stick = 1;
    repeat (4) @(posedge sclk); #0.6 stick = 0;
    wait_ticks(1);
    rd(A_CM_STS, d);
    check(d[1], 8, "stick width status");
    // 14: clock manager handshake
    wr(A_CM_CTL, 16'h2000);
    check(dcm_ps_en && !dcm_ps_inc, 14, "phase shift enable");
    @(posedge sclk); #0.6 dcm_ps_done = 1;
    @(posedge sclk); #0.6 dcm_ps_done = 0;
    wait_ticks(1);
    rd(A_CM_STS, d);
    check(d[6], 14, "phase shift done");
    wr(A_CM_CTL, 16'h0000);
    // 9: error register
    wr(A_CM_DID, 16'h0BAD);
    rd(A_CM_ERR, d);
    check(d[0], 9, "write to read-only");
    // 13: software reset
    wr(A_FM_DSEL, 16'h0000);
    wait_ticks(1);
    max_quiet = 0; quiet_run = 0;
    repeat (40) @(posedge sclk);
    check(max_quiet < 3, -1, "continuous output before reset");
    pass_chk = 0;                                // the reset clears the ports too
    wr(A_CM_CTL, 16'h0001);
    repeat (100) @(posedge sclk);
    check(max_quiet >= 3, 13, "software reset");
    rd(A_CM_CFG, d);
    check(d == OUT_A, 13, "registers kept");
    foreach (mech[i])
      if (mech[i] == 0) begin
        failures++;
        $display("mechanism %0d never seen", i);
      end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #3_000_000;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $display("watchdog");
    foreach (mech[i]) $display("mechanism %0d: %0d", i, mech[i]);
    $finish;
  end
endmodule
