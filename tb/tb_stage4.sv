// tb_stage4 -- checks STAGE4, the decimating FIR with 1 multiplier.
//
// Coefficients are loaded through the CADD / CVAL chain and read back.  Random
// samples enter at every clock, an output is produced every 2^DDEC clocks
// (restarted by the tick), and each output is compared with a direct-form
// model computed here: sum over k = 0..NTAP of coef[k] * x[n-k] top 32 of 40 bits, then the output block's scaling.  Validity and
// tick over the decimation window, the write address at the tick and the
// latency ((steps - 1) * 2^CDEC + 5 clocks) are checked too.
module tb_stage4;
  import sbf_pkg::*;
  timeunit 1ns; timeprecision 100ps;
  localparam int NMUL = 1;
  localparam int CAW  = $clog2(512 / NMUL);

  logic               clk = 1'b0, rst = 1'b1;
  logic               in_stb = 1'b0, in_v = 1'b0, in_tk = 1'b0, in_nd = 1'b0, mix = 1'b0;
  logic signed [15:0] in_d = '0, in_d2 = '0;
  logic signed [11:0] in_pe = '0;
  logic [3:0]         ddec = 4'd9, cdec = '0;
  logic [8:0]         ntap = 9'd63;
  logic [CAW-1:0]     cadd = '0;
  logic               cval_we = 1'b0, raddr = 1'b0;
  logic [15:0]        cval = '0, cval_rd, scale = 16'h0100;
  logic [9:0]         vlen = 10'd1, fdly = '0, wadd;
  nb_t                out;
  logic               clip;
  int                 checks = 0, failures = 0;

  nb_t in_b;
  assign in_b = '{stb: in_stb, d: in_d, v: in_v, tk: in_tk, nd: in_nd, pe: in_pe};

  stage4 dut (.clk(clk), .rst(rst), .in(in_b), .ddec(ddec), .cdec(cdec), .ntap(ntap), .cadd(cadd), .cval_we(cval_we),
    .cval(cval), .raddr(raddr), .vlen(vlen), .fdly(fdly), .scale(scale), .out(out),
    .clip(clip), .cval_rd(cval_rd), .wadd(wadd));

  always #1 clk = ~clk;

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; if (failures < 10) $display("FAIL: %s", what); end
  endtask

  logic signed [15:0] coef [512];
  logic signed [15:0] xc [$], xs [$];   // sample history, [0] newest
  int cyc = 0;
  always @(posedge clk) cyc <= cyc + 1;

  typedef struct { logic signed [15:0] d; logic v; logic tk; int t; bit chk; } exp_t;
  exp_t q [$];
  int lat;
  bit quiet = 1'b1;

  always @(negedge clk) begin
    if (!rst && !quiet && out.stb) begin
      exp_t e;
      if (q.size() == 0) check(1'b0, "unexpected output");
      else begin
        e = q.pop_front();
        if (e.chk) check(out.d == e.d, $sformatf("d %0d want %0d", out.d, e.d));
        check(out.v == e.v, "valid");
        check(out.tk == e.tk, "tick");
        check(cyc - e.t == lat, $sformatf("latency %0d want %0d", cyc - e.t, lat));
      end
    end
  end

  function automatic logic signed [15:0] model();
    logic signed [63:0] acc, r;
    acc = 0;
    for (int k = 0; k <= ntap; k++) begin
      logic signed [15:0] x;
      if (mix) x = (k % 2 == 0) ? xc[k / 2] : xs[k / 2];
      else     x = xc[k];
      acc += 64'(coef[k]) * 64'(x);
    end
    acc = 64'($signed(acc[39:8]));
    r = (acc * $signed({1'b0, scale}) + 64'sd32768) >>> 16;
    if (r > 32767) r = 32767;
    if (r < -32767) r = -32767;
    return 16'(r);
  endfunction

  task automatic load();
    for (int j = 0; j < 512 / NMUL; j++) begin
      cadd = CAW'(j);
      for (int m = 0; m < NMUL; m++) begin
        cval = coef[j * NMUL + m]; cval_we = 1'b1;
        @(negedge clk);
      end
      cval_we = 1'b0;
      @(negedge clk);
      check(cval_rd == coef[j * NMUL], "coefficient read back");
    end
  endtask

  task automatic run(input int samples);
    int ph = 0; logic wv = 1'b1, wtk = 1'b0;
    for (int i = 0; i < samples; i++) begin
      @(negedge clk);
      in_stb = 1'b1;
      in_d  = 16'($signed(12'($urandom)));
      in_d2 = 16'($signed(12'($urandom)));
      in_v  = ($urandom_range(0, 40) != 0);
      in_tk = (i % 1024 == 0);
      xc.push_front(in_d); xs.push_front(in_d2);
      if (xc.size() > 600) begin void'(xc.pop_back()); void'(xs.pop_back()); end
      if (in_tk) ph = 0;
      wv = wv && in_v; wtk = wtk || in_tk;
      if (ph == 0) begin
        exp_t e;
        e.d = model(); e.v = wv; e.tk = wtk; e.t = cyc;
        // after a mode change or an address restart the RAMs do not yet
        // hold the history the model assumes
        e.chk = (i > ntap) && !(raddr && (i % 1024) <= ntap);
        if (xc.size() > 520) q.push_back(e);
        else if (i > 0) q.push_back(e);
        wv = 1'b1; wtk = 1'b0;
      end
      ph = (ph + 1) % (1 << ddec);
    end
    @(negedge clk); in_stb = 1'b0; in_tk = 1'b0;
    repeat (600) @(negedge clk);
  endtask

  initial begin
    foreach (coef[k]) coef[k] = 16'($signed(12'($urandom)));
    repeat (3) @(negedge clk);
    rst = 1'b0;
    load();
    // prefill history with zeros written into the data RAMs
    for (int i = 0; i < 1024; i++) begin
      @(negedge clk); in_stb = 1'b1; in_d = '0; in_d2 = '0; in_v = 1'b1; in_tk = 1'b0;
    end
    @(negedge clk); in_stb = 1'b0;
    rst = 1'b1; @(negedge clk); rst = 1'b0;
    repeat (600) begin xc.push_front('0); xs.push_front('0); end
    quiet = 1'b0;
    ntap = 9'd63; ddec = 4'd7; cdec = 4'd0; raddr = 1'b0; lat = 63 * 1 + 5;
    run(1100);
    ntap = 9'd127; ddec = 4'd9; cdec = 4'd1; raddr = 1'b0; lat = 127 * 2 + 5;
    run(1100);
    ntap = 9'd255; ddec = 4'd9; cdec = 4'd0; raddr = 1'b1; lat = 255 * 1 + 5;
    run(1100);
    check(wadd == 10'd0, "write address restarted at the tick");
    check(q.size() == 0, "all outputs seen");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
