// tb_mcbi -- self-checking testbench for mcbi.
//
// Runs the register file from a 20 MHz bus clock unrelated to the 256 MHz
// system clock and checks:
//   * reset values (identity crossbar, D2_SEED, unit scales, FM_QBIT, DID);
//   * write then read back of a set of read/write registers with random
//     data, cut to their field widths, and the matching cfg fields;
//   * read of monitor values (split 22-bit counters, sign-extended phase
//     error);
//   * the error register: write to a read-only register, write to and read
//     from a non-existent register, CM_DEF capturing the bad data and being
//     returned for a non-existent read, and clearing CM_ERR by writing 0;
//   * status events saved at the tick and cleared by an XOR write;
//   * the self-clearing software reset bit and its one-clock pulse;
//   * coefficient write strobes gated by the CM_CTL load bit.
// The run ends with the TB_RESULT line; a watchdog stops a hung run.
`timescale 1ns / 100ps
module tb_mcbi;
  import sbf_pkg::*;
  logic clk = 1'b0, rst = 1'b1, tick = 1'b0;
  always #1.953 clk = ~clk;
  logic mcb_clk = 1'b0, mcb_cs_n = 1'b1, mcb_rd_wr_n = 1'b1;
  always #25 mcb_clk = ~mcb_clk;
  logic [7:0] mcb_addr = '0;
  logic [15:0] mcb_data_i = '0, mcb_data_o;
  logic mcb_oe, sw_rst;
  cfg_t cfg;
  wstb_t wstb;
  mon_t mon;

  mcbi dut (.*);

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL %s at %0t", what, $time);
    end
  endtask

  // strobe and reset pulse counters
  int n_s1cval, n_swrst;
  always @(posedge clk) begin
    if (wstb.s1_cval) n_s1cval++;
    if (sw_rst) n_swrst++;
  end

  task automatic bus_write(input logic [7:0] a, input logic [15:0] d);
    @(negedge mcb_clk);
    mcb_cs_n = 0; mcb_rd_wr_n = 0; mcb_addr = a; mcb_data_i = d;
    @(negedge mcb_clk);
    mcb_cs_n = 1; mcb_rd_wr_n = 1;
    @(negedge mcb_clk);
  endtask

  task automatic bus_read(input logic [7:0] a, output logic [15:0] d);
    @(negedge mcb_clk);
    mcb_cs_n = 0; mcb_rd_wr_n = 1; mcb_addr = a;
    @(posedge mcb_clk);
    check(mcb_oe, "read drives the bus");
    @(negedge mcb_clk);
    d = mcb_data_o;
    mcb_cs_n = 1;
    @(negedge mcb_clk);
  endtask

  task automatic expect_reg(input logic [7:0] a, input logic [15:0] e, input string what);
    logic [15:0] d;
    bus_read(a, d);
    check(d == e, what);
    if (d != e) $display("  reg %h read %h expected %h", a, d, e);
  endtask

  typedef struct { logic [7:0] a; logic [15:0] m; } rw_t;
  rw_t rw [] = '{'{A_CM_CFG, 16'hFFFF}, '{A_IO_SDLY, 16'hFFFF}, '{A_IO_DSEL, 16'h007F},
                 '{A_D1_DLY2, 16'hFFFF}, '{A_D1_DDEC, 16'h000F}, '{A_S1_VLEN, 16'h03FF},
                 '{A_S2_NTAP, 16'h01FF}, '{A_S3_CADD, 16'h00FF}, '{A_S4_CADD, 16'h01FF},
                 '{A_FM_BLEV, 16'hFFFF}, '{A_FM_QBIT, 16'h0007}, '{A_D2_ADLY, 16'h1FFF},
                 '{A_D2_SEED, 16'hFFFF}, '{A_S2_MFAZR0, 16'hFFFF}, '{A_FM_TFAZ1, 16'hFFFF}};

  initial begin
    logic [15:0] d, v;
    mon = '0;
    n_s1cval = 0; n_swrst = 0;
    repeat (4) @(posedge clk);
    #1 rst = 0;
    repeat (4) @(posedge clk);
    // reset values
    expect_reg(A_CM_DID, 16'h2511, "DID");
    expect_reg(A_S1_XBAR3, 16'h3210, "xbar3");
    expect_reg(A_S1_XBAR0, 16'hFEDC, "xbar0");
    expect_reg(A_D2_SEED, 16'h1357, "seed");
    expect_reg(A_S3_SCALE, 16'h0001, "scale");
    expect_reg(A_FM_QSCL, 16'h7FFF, "qscl");
    expect_reg(A_FM_QBIT, 16'd3, "qbit");
    expect_reg(A_CM_ERR, 16'd0, "no error");
    // read/write registers
    for (int r = 0; r < 3; r++)
      foreach (rw[i]) begin
        v = 16'($urandom);
        bus_write(rw[i].a, v);
        expect_reg(rw[i].a, v & rw[i].m, $sformatf("rw %h", rw[i].a));
      end
    bus_write(A_D1_DLY1, 16'hBEEF);
    check(cfg.d1_dly[31:16] == 16'hBEEF, "cfg d1_dly");
    bus_write(A_FM_DSEL, 16'h000B);
    check(cfg.fm_dsel == 4'hB, "cfg fm_dsel");
    // monitor values
    mon.fm_vcf = 22'h2A_5A5A; mon.d1_perr = 12'h823; mon.io_tint = 22'h15_1234;
    expect_reg(A_FM_VCF1, 16'h002A, "vcf hi");
    expect_reg(A_FM_VCF0, 16'h5A5A, "vcf lo");
    expect_reg(A_D1_PERR, 16'hF823, "perr sign");
    expect_reg(A_IO_TINT0, 16'h1234, "tint lo");
    // errors
    bus_write(A_CM_DID, 16'hAAAA);
    expect_reg(A_CM_ERR, 16'h0001, "err ro");
    expect_reg(A_CM_DEF, 16'hAAAA, "def ro");
    expect_reg(A_CM_DID, 16'h2511, "DID kept");
    bus_write(8'hFF, 16'h5555);
    expect_reg(A_CM_ERR, 16'h0003, "err none");
    expect_reg(8'hFE, 16'h5555, "none reads def");
    expect_reg(A_CM_ERR, 16'h0007, "err read none");
    bus_write(A_CM_ERR, 16'h0000);
    expect_reg(A_CM_ERR, 16'h0000, "err cleared");
    // status: an event, then a tick
    @(posedge clk); #0.5 mon.sts_evt = 10'h014;
    @(posedge clk); #0.5 mon.sts_evt = '0;
    repeat (3) @(posedge clk); #0.5 tick = 1;
    @(posedge clk); #0.5 tick = 0;
    expect_reg(A_CM_STS, 16'h0014, "status saved");
    bus_write(A_CM_STS, 16'h0004);
    expect_reg(A_CM_STS, 16'h0010, "status xor");
    @(posedge clk); #0.5 tick = 1;
    @(posedge clk); #0.5 tick = 0;
    expect_reg(A_CM_STS, 16'h0000, "status next interval");
    // software reset
    bus_write(A_CM_CTL, 16'h0001 | 16'h0010);
    expect_reg(A_CM_CTL, 16'h0010, "swreset self-clears");
    check(n_swrst == 1, "one reset pulse");
    // coefficient strobes need the load bit
    bus_write(A_S1_CVAL, 16'h0123);
    check(n_s1cval == 0, "no strobe without load");
    bus_write(A_CM_CTL, 16'h0008);
    bus_write(A_S1_CVAL, 16'h0123);
    bus_write(A_S1_CVAL, 16'h0456);
    check(n_s1cval == 2, "two strobes with load");
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
