// tb_sbf_full -- full-size testbench for sbf_top (default parameters).
//
// Builds the Filter FPGA exactly as configured for the board (8192-word
// DELAY1 line, 8192-clock DELAY2 lines) and checks through the MCB bus and
// the output pins that the full-depth delay lines work: with the internal
// test source on, A delayed by 5000 clocks and B not delayed, every ATICK
// must come exactly 5000 clocks after the BTICK it belongs to, and A must
// carry the same sample nibbles as B 5000 clocks later.  It also reads back
// the design identifier and the DELAY2 registers.  Last, STAGE2..STAGE4 are
// set for the narrowest bandwidth (31.25 kHz, decimation 4096), and A must
// carry exactly two samples per tick interval.  The run ends with the
// TB_RESULT line; a watchdog stops a hung run.
`timescale 1ns / 10ps
module tb_sbf_full;
  import sbf_pkg::*;
  localparam int TP = 8192;
  localparam int DA = 5000;

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

  sbf_top dut (.*);

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL %s at %0t", what, $time);
    end
  endtask

  longint cyc = 0;
  logic [4:0] bq [$];
  bit cmp_on = 0;
  int n_cmp = 0;
  always @(posedge sclk) begin
    #0.5;
    cyc++;
    idata_a = {$urandom, $urandom};
    itick_a = (cyc % TP) == 0;
    if (cmp_on) begin
      bq.push_back({bdata, bsind});
      if (bq.size() > DA) begin
        logic [4:0] e;
        e = bq.pop_front();
        if (e[0]) begin
          check({adata, asind} == e, "A repeats B");
          n_cmp++;
        end
      end
    end
  end

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

  initial begin
    logic [15:0] d;
    repeat (10) @(posedge sclk);
    rst_n = 1;
    repeat (10) @(posedge sclk);
    rd(A_CM_DID, d);  check(d == 16'h2511, "DID");
    wr(A_D2_ADLY, 16'(DA));
    wr(A_D2_BDLY, 16'd0);
    rd(A_D2_ADLY, d); check(d == 16'(DA), "ADLY");
    wr(A_CM_CFG, 16'h1000);                      // internal test source
    repeat (DA + 200) @(posedge sclk);
    cmp_on = 1;
    for (int i = 0; i < 3; i++) begin
      longint tb0;
      @(posedge btick); tb0 = cyc;
      @(posedge atick);
      check(cyc - tb0 == DA, "tick delay");
    end
    check(n_cmp > 1000, "samples compared");
    // narrowest bandwidth, 31.25 kHz: STAGE4 gives one sample per 4096 clocks
    cmp_on = 0;
    wr(A_D2_ADLY, 16'd0); wr(A_CM_CFG, 16'h0000);
    wr(A_S2_NTAP, 16'd63); wr(A_S2_DDEC, 16'd4);
    wr(A_S3_NTAP, 16'd63); wr(A_S3_DDEC, 16'd8);
    wr(A_S4_NTAP, 16'd63); wr(A_S4_DDEC, 16'd12);
    wr(A_FM_DSEL, 16'h0003);
    repeat (3 * TP) @(posedge sclk);
    for (int i = 0; i < 2; i++) begin
      int ns;
      ns = 0;
      @(posedge atick);
      repeat (2 * TP) begin
        @(posedge sclk); #0.6;
        if (asind) ns++;
      end
      check(ns == 2 * TP / 4096, "31.25 kHz sample count");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #2_000_000;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $display("watchdog");
    $finish;
  end
endmodule
