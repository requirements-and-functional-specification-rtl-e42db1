// tb_stage1 -- checks STAGE1: crossbar, 16 look-up-table FIRs, mode
// combination, DC offset, output block and the product-table load path.
//
// Random product tables are loaded through the S1_CADD / S1_CVAL chain and
// one entry is read back.  Random 64-bit words with random validity and
// periodic ticks are then filtered in 4-bit mode, 8-bit mode, VLBI mode with
// the fractional filter chosen by the register, and with the output rate
// divided by 4.  Each output is compared with a model written here from the
// definitions: lane k takes input nibble XBAR[k]; each filter sums the table
// entries its last 32 lane samples select; 4-bit mode adds all 16 sums,
// 8-bit mode adds (sum of filters 8..15) x 16 to the sum of filters 0..7,
// VLBI mode takes one filter; the result, left-justified to 32 bits, plus
// S1_IDC, is scaled as in the output block.  The DC sum and valid count
// (S1_ODC, S1_VDC) of a tick interval and the 6-clock latency are checked.
module tb_stage1;
  import sbf_pkg::*;
  timeunit 1ns; timeprecision 100ps;
  localparam int NBIT = 12;

  logic               clk = 1'b0, rst = 1'b1;
  logic               in_ce = 1'b0, in_tk = 1'b0, in_v = 1'b0, in_nd = 1'b0;
  logic [63:0]        in_data = '0;
  logic signed [11:0] in_pe = '0;
  logic [3:0]         in_frac = '0, fbit = '0, cadd = '0, ddec = '0;
  logic               mode8 = 1'b0, vlbi = 1'b0, load = 1'b0, fbit_en = 1'b0, cval_we = 1'b0;
  logic [63:0]        xbar = '0;
  logic [NBIT-1:0]    cval = '0, cval_rd;
  logic [9:0]         vlen = 10'd1, fdly = '0;
  logic [15:0]        scale = 16'h7FFF;
  logic [31:0]        idc = '0;
  nb_t                out;
  logic               clip;
  logic [47:0]        odc;
  logic [21:0]        vdc;
  int                 checks = 0, failures = 0;

  stage1 #(.NBIT(NBIT)) dut (.clk(clk), .rst(rst), .in_ce(in_ce), .in_data(in_data),
    .in_tk(in_tk), .in_v(in_v), .in_nd(in_nd), .in_pe(in_pe), .in_frac(in_frac),
    .mode8(mode8), .vlbi(vlbi), .load(load), .fbit_en(fbit_en), .fbit(fbit), .xbar(xbar),
    .cadd(cadd), .cval_we(cval_we), .cval(cval), .ddec(ddec), .vlen(vlen), .fdly(fdly),
    .scale(scale), .idc(idc), .out(out), .clip(clip), .cval_rd(cval_rd), .odc(odc), .vdc(vdc));

  always #1 clk = ~clk;

  initial begin
    #2000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; if (failures < 10) $display("FAIL: %s", what); end
  endtask

  logic [NBIT-1:0] tbl [16][32][16];
  logic [3:0]      lh [16][32];        // lane history, [0] newest
  int              cyc = 0;
  always @(posedge clk) cyc <= cyc + 1;

  typedef struct { logic signed [15:0] d; logic v; logic tk; int t; logic chk; } exp_t;
  exp_t q [$];

  always @(negedge clk) begin
    if (!rst && !load && out.stb) begin
      exp_t e;
      if (q.size() == 0) check(1'b0, "unexpected output");
      else begin
        e = q.pop_front();
        if (e.chk) begin
          check(out.d == e.d, $sformatf("d %0d want %0d", out.d, e.d));
          check(out.v == e.v, "valid");
        end
        check(out.tk == e.tk, "tick");
        check(cyc - e.t == 6, $sformatf("latency %0d", cyc - e.t));
      end
    end
  end

  function automatic logic signed [15:0] post(input logic signed [63:0] x);
    logic signed [63:0] r;
    r = (x * $signed({1'b0, scale}) + 64'sd32768) >>> 16;
    if (r > 32767) r = 32767;
    if (r < -32767) r = -32767;
    return 16'(r);
  endfunction

  longint odc_m, odc_prev; int vdc_m, vdc_prev, ticks;

  task automatic run(input int samples, input int dec);
    int ph = 0; logic wv = 1'b1, wtk = 1'b0;
    for (int i = 0; i < samples; i++) begin
      logic signed [31:0] fs [16];
      logic signed [63:0] tot, lo, hi, x;
      logic [3:0] fr;
      @(negedge clk);
      in_ce = 1'b1;
      in_data = {$urandom, $urandom};
      in_v  = ($urandom_range(0, 9) != 0);
      in_tk = (dec > 1) ? (i % 64 == 0) : (i % 64 == 63);
      in_nd = $urandom_range(0, 1);
      in_frac = 4'($urandom);
      for (int k = 0; k < 16; k++) begin
        for (int t = 31; t > 0; t--) lh[k][t] = lh[k][t-1];
        lh[k][0] = in_data[4 * xbar[4*k +: 4] +: 4];
      end
      lo = 0; hi = 0;
      for (int k = 0; k < 16; k++) begin
        fs[k] = 0;
        for (int t = 0; t < 32; t++) fs[k] += 32'($signed(tbl[k][t][lh[k][t]]));
        if (k < 8) lo += 64'(fs[k]); else hi += 64'(fs[k]);
      end
      tot = mode8 ? (hi * 16 + lo) : (hi + lo);
      fr  = fbit_en ? fbit : in_frac;
      x   = vlbi ? (64'(fs[fr]) <<< 15) : (tot <<< (32 - (NBIT + 13)));
      x   = 64'(32'(x + 64'($signed(idc))));
      if (in_tk) ph = 0;
      wv = wv && in_v; wtk = wtk || in_tk;
      if (ph == 0) begin
        exp_t e;
        e.d = post(x); e.v = wv; e.tk = wtk; e.t = cyc; e.chk = (i >= 32);
        q.push_back(e);
        wv = 1'b1; wtk = 1'b0;
        if (in_tk) begin
          odc_prev = odc_m; vdc_prev = vdc_m; ticks++;
          odc_m = in_v ? x : 0; vdc_m = in_v ? 1 : 0;
        end else if (wv && in_v) begin odc_m += x; vdc_m++; end
      end
      ph = (ph + 1) % dec;
    end
    @(negedge clk); in_ce = 1'b0; in_tk = 1'b0;
    repeat (8) @(negedge clk);
  endtask

  initial begin
    // random crossbar permutation
    int perm [16];
    foreach (perm[k]) perm[k] = k;
    perm.shuffle();
    foreach (perm[k]) xbar[4*k +: 4] = 4'(perm[k]);
    foreach (lh[k, t]) lh[k][t] = '0;
    foreach (tbl[k, t, a]) tbl[k][t][a] = NBIT'($urandom) >>> 2;
    repeat (3) @(negedge clk);
    rst = 1'b0;
    // load the product tables: write w of address a lands in filter w/32, tap w%32
    load = 1'b1;
    for (int a = 0; a < 16; a++) begin
      cadd = 4'(a); in_ce = 1'b1;
      repeat (32) @(negedge clk);
      in_ce = 1'b0;
      for (int w = 0; w < 512; w++) begin
        cval = tbl[w / 32][w % 32][a]; cval_we = 1'b1;
        @(negedge clk);
      end
      cval_we = 1'b0;
      @(negedge clk);
      check(cval_rd == tbl[0][0][a], "product read back");
    end
    repeat (8) @(negedge clk);
    load = 1'b0;
    rst = 1'b1; @(negedge clk); rst = 1'b0;

    idc = 32'($signed(-1000));
    scale = 16'h9000;
    run(300, 1);
    check(ticks >= 3 && odc == 48'(odc_prev) && vdc == 22'(vdc_prev),
          $sformatf("S1_ODC %0d/%0d want %0d/%0d", $signed(odc), vdc, odc_prev, vdc_prev));
    mode8 = 1'b1; q.delete();
    run(200, 1);
    mode8 = 1'b0; vlbi = 1'b1; scale = 16'h4000;
    run(200, 1);
    fbit_en = 1'b1; fbit = 4'd9;
    run(200, 1);
    vlbi = 1'b0; fbit_en = 1'b0;
    // output rate divided by 4: the output divider restarts at the tick
    ddec = 4'd2;
    run(256, 4);
    check(q.size() == 0, "all outputs seen");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
