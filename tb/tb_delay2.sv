// tb_delay2 -- self-checking testbench for delay2.
//
// Drives random FORMAT samples (every clock or with gaps) and checks the
// three output bundles clock by clock against a behavioural model of the
// serializer: 4-bit coding with the 0x8 invalid code, 8-bit coding LS
// nibble first with the valid flag in bit 7 or sign extension with the 0x80
// invalid code, the A filler (0x5/0xA or 0x8) and the B filler, the phase
// error on C as two nibbles, and the internal pseudo-random source.  Each
// bundle must come out delayed by exactly its delay register value plus one
// clock (several values, including 0, on a shortened delay line).  The
// per-tick CRC of each output is modelled over the delayed wires, including
// the SIND wire and error injection.  The run ends with the TB_RESULT line; a
// watchdog stops a hung run.
`timescale 1ns / 100ps
module tb_delay2;
  import sbf_pkg::*;
  localparam int AW = 8;
  logic clk = 1'b0, rst = 1'b1;
  always #2 clk = ~clk;

  logic in_stb = 0, in_v = 0, in_tk = 0;
  logic signed [7:0] in_d = '0, in_pe = '0;
  logic mode8 = 0, intgen = 0, no_acbal = 0, no_b7v = 0;
  logic [2:0] dsel = '0, esel = '0;
  logic [12:0] adly = '0, bdly = '0, cdly = '0;
  logic [15:0] seed = 16'h1357;
  logic [3:0] adata, bdata, cperr;
  logic atick, btick, ctick, asind, bsind, csind;
  logic [11:0] mon_crc;

  delay2 #(.AW(AW)) dut (.*);

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL %s at %0t", what, $time);
    end
  endtask

  // serializer model state (mirrors the registers after each edge)
  logic [15:0] lfsr;
  bit ms_due, pms_due, fill_ph;
  logic [3:0] ms_nib, pms_nib;
  logic [5:0] hs [3][$];           // model undelayed bundles, one per clock
  logic [3:0] mcrc [3], mmon [3];
  int nt, run_len;

  // model of one clock edge with the inputs now applied
  task automatic edge_model;
    logic [7:0] smp, pe, b;
    logic v;
    logic [5:0] sa, sb, sc;
    smp = intgen ? lfsr[7:0] : in_d;
    pe  = intgen ? lfsr[15:8] : in_pe;
    v   = intgen ? 1'b1 : in_v;
    b   = no_b7v ? (v ? smp : 8'h80) : {v, smp[6:0]};
    sa = hs[0][$]; sb = hs[1][$]; sc = hs[2][$];
    if (in_stb && !mode8) begin
      sa = {v ? smp[3:0] : 4'h8, in_tk, 1'b1}; sb = sa;
      ms_due = 0;
    end else if (in_stb) begin
      sa = {b[3:0], in_tk, 1'b1}; sb = sa; ms_due = 1; ms_nib = b[7:4];
    end else if (ms_due) begin
      sa = {ms_nib, 2'b01}; sb = sa; ms_due = 0;
    end else begin
      sa = {no_acbal ? 4'h8 : (fill_ph ? 4'hA : 4'h5), 2'b00}; sb = {4'h8, 2'b00};
    end
    if (in_stb && !pms_due) begin
      sc = {pe[3:0], in_tk, 1'b1}; pms_due = 1; pms_nib = pe[7:4];
    end else if (pms_due) begin
      sc = {pms_nib, 2'b01}; pms_due = 0;
    end else sc = {4'h0, in_stb && in_tk, 1'b0};
    fill_ph = !fill_ph;
    if (intgen && in_stb) lfsr = {lfsr[14:0], lfsr[15] ^ lfsr[13] ^ lfsr[12] ^ lfsr[10]};
    if (!intgen) lfsr = seed;
    hs[0].push_back(sa); hs[1].push_back(sb); hs[2].push_back(sc);
    for (int i = 0; i < 3; i++) if (hs[i].size() > 600) void'(hs[i].pop_front());
  endtask

  // one clock: check the delayed outputs, update the CRC model, then step
  task automatic step(input bit chk);
    logic [5:0] o [3], e;
    int dl [3];
    bit wb;
    o[0] = {adata, atick, asind}; o[1] = {bdata, btick, bsind}; o[2] = {cperr, ctick, csind};
    dl[0] = adly; dl[1] = bdly; dl[2] = cdly;
    for (int i = 0; i < 3; i++) begin
      if (chk && run_len > dl[i] + 3) begin
        e = hs[i][hs[i].size() - 2 - dl[i]];
        check(o[i] == e, $sformatf("bundle %0d", i));
        if (nt >= 2) check(mon_crc[4*i +: 4] == mmon[i], $sformatf("crc %0d", i));
      end
      wb = dsel[2] ? o[i][0] : o[i][2 + dsel[1:0]];
      if (esel[2] && esel[1:0] == dsel[1:0]) wb = ~wb;
      if (o[i][1]) begin
        mmon[i] = mcrc[i]; mcrc[i] = crc4_step(4'd0, wb);
        if (i == 0) nt++;
      end else mcrc[i] = crc4_step(mcrc[i], wb);
    end
    edge_model;
    run_len++;
    @(posedge clk); #1;
    in_stb = 0;
  endtask

  task automatic drive(input int n, input int gap, input int tkp);
    for (int i = 0; i < n; i++) begin
      in_stb = 1; in_v = ($urandom % 5) != 0; in_tk = (i % tkp) == 0;
      in_d = 8'($urandom); in_pe = 8'($urandom);
      step(1);
      for (int g = 1; g < gap; g++) step(1);
    end
  endtask

  task automatic setup(input bit m8, input bit ig, input int gap);
    // the mode changes between edges, so the model and the CRCs restart
    mode8 = m8; intgen = ig; nt = 0; run_len = 0;
    adly = 13'($urandom % 200); bdly = 13'd0; cdly = 13'($urandom % 250);
  endtask

  initial begin
    lfsr = 16'h1357; ms_due = 0; pms_due = 0; fill_ph = 0; ms_nib = 0; pms_nib = 0;
    for (int i = 0; i < 3; i++) begin hs[i].push_back('0); mcrc[i] = 0; mmon[i] = 0; end
    nt = 0; run_len = 0;
    repeat (3) @(posedge clk);
    #1 rst = 0;
    setup(0, 0, 1);  drive(800, 1, 64);                       // 4-bit, 256 Ms/s
    setup(0, 0, 3);  dsel = 3'd5; drive(400, 3, 16);          // 4-bit with fill, SIND CRC
    setup(1, 0, 2);  dsel = 3'd2; esel = 3'd6; drive(400, 2, 16);   // 8-bit, error injection
    setup(1, 0, 4);  no_b7v = 1; no_acbal = 1; esel = 0; drive(300, 4, 12);
    setup(1, 1, 2);  no_b7v = 0; no_acbal = 0; drive(400, 2, 20);   // internal source
    check(nt > 5, "ticks seen");
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
